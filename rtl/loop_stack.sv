// loop_stack: hardware stack of loop counters for REPEAT / BNZ.
//
// REPEAT n pushes the iteration count n and the address of the first
// instruction of the loop body. BNZ looks at the top entry: when more
// iterations remain it decrements the counter and reports a taken branch
// to the stored address; on the last iteration it pops the entry and the
// program falls through. A count of 0 or 1 runs the body once. Nesting
// depth is seven levels, as the document gives; the count/address pairing
// and the "n iterations" meaning of the count are this design's choices.
// Pushes beyond the depth and BNZ on an empty stack set a sticky error.
// Interface: push/bnz are single-cycle strobes; taken/target are
// combinational from the current top so the control unit can redirect the
// program counter in the cycle it decodes BNZ.
module loop_stack
#(
  parameter int unsigned LEVELS = 7,
  parameter int unsigned CW     = 20,
  parameter int unsigned PW     = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [CW-1:0] push_cnt,
  input  logic [PW-1:0] push_pc,
  input  logic          bnz,
  output logic          taken,
  output logic [PW-1:0] target,
  output logic [$clog2(LEVELS+1)-1:0] depth,
  output logic          error
);
  logic [CW-1:0] cnt [LEVELS];
  logic [PW-1:0] pcs [LEVELS];
  localparam int unsigned DW = $clog2(LEVELS+1);

  logic [DW-1:0] top;
  assign top    = depth - 1'b1;
  assign taken  = bnz && depth != '0 && cnt[top] > CW'(1);
  assign target = pcs[top];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth <= '0;
      error <= 1'b0;
      for (int i = 0; i < int'(LEVELS); i++) begin
        cnt[i] <= '0;
        pcs[i] <= '0;
      end
    end else if (clear) begin
      depth <= '0;
    end else if (push) begin
      if (depth == DW'(LEVELS)) error <= 1'b1;
      else begin
        cnt[depth] <= push_cnt;
        pcs[depth] <= push_pc;
        depth      <= depth + 1'b1;
      end
    end else if (bnz) begin
      if (depth == '0) error <= 1'b1;
      else if (taken) cnt[top] <= cnt[top] - 1'b1;
      else depth <= depth - 1'b1;
    end
  end
endmodule
