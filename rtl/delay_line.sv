// delay_line: time-delay element x(t - tau) of the fractional-order time-delay
// systems, with tau = DEPTH * dt.
//
// A ring buffer of DEPTH words, each holding the LANES state values of one Euler
// step. On every step the word at the pointer is read (it was written DEPTH steps
// earlier) and then overwritten by the current states, and the pointer advances.
// Until DEPTH samples have been written since the last load, the history before
// t = 0 is taken to be the constant initial condition 'init', so dout = init while
// the buffer fills; a fill flag per entry is not needed because a counter saturating
// at DEPTH records how much of the ring is valid. The memory is an array with one
// write port and an asynchronous read, which maps to distributed RAM.
// The delay itself is the published design's; its length and the prehistory rule
// are this design's choices.
//
// Interface and timing: dout is combinational from the memory, the pointer and the
// fill counter: it is the sample to use in the current step. load restarts the
// history (synchronous); step writes din and advances.
module delay_line
  import fx_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned DEPTH = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  fx_t  init [LANES],
  input  logic step,
  input  fx_t  din  [LANES],
  output fx_t  dout [LANES],
  output logic full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef logic [LANES*FX_W-1:0] word_t;

  word_t           mem [DEPTH];
  logic [AW-1:0]   ptr;
  logic [CW-1:0]   fill;
  word_t           rd, wr;

  assign rd   = mem[ptr];
  assign full = (fill == CW'(DEPTH));

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      wr[i*FX_W +: FX_W] = din[i];
      dout[i]            = full ? fx_t'(rd[i*FX_W +: FX_W]) : init[i];
    end
  end

  always_ff @(posedge clk) begin
    if (step && !load) mem[ptr] <= wr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      ptr  <= '0;
      fill <= '0;
    end else if (step) begin
      ptr  <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      if (!full) fill <= fill + 1'b1;
    end
  end

endmodule
