// nbuf_fifo: cyclic input buffer for data arriving from one neighbour PE.
//
// Each PE has four of these (North, East, West, South) for the 2D mesh.
// A neighbour that scatters to this PE raises in_valid for one cycle and
// the word is appended; the PE's pipeline pops the head when an instruction
// names this buffer as an operand source (OPSrc) or as the source of NPASS
// or NST. The write and read pointers wrap around a circular array; BFLUSH
// resets both pointers (flush). The head word is read combinationally, so
// a pop in Execute1 sees the oldest word in the same cycle. Writes to a
// full buffer are dropped and set a sticky overflow flag, pops of an empty
// buffer return the stale head and set a sticky underflow flag; both are
// programming errors in a statically scheduled program. The cyclic
// organisation and the flush follow the text; the depth (512, one block
// RAM at 64 bits) and the overflow policy are this design's choices.
module nbuf_fifo
  import dragon_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    in_valid,
  input  word_t   in_data,
  input  logic    pop,
  output word_t   head,
  output logic    empty,
  output logic [AW:0] count,
  output logic    overflow,
  output logic    underflow
);
  word_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          full;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign head  = mem[rptr];

  logic do_wr, do_rd;
  assign do_wr = in_valid && !full && !flush;
  assign do_rd = pop && !empty && !flush;

  always_ff @(posedge clk) if (do_wr) mem[wptr] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
      overflow <= 1'b0; underflow <= 1'b0;
    end else if (flush) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (in_valid && full) overflow  <= 1'b1;
      if (pop && empty)     underflow <= 1'b1;
    end
  end
endmodule
