// channel_fifo: small synchronous FIFO used as the channel between a trigger
// and a protection unit.
//
// Values are pushed when push_i is high and not full, and popped when pop_i
// is high and not empty. The head is read from a register, so a value pushed
// in cycle t is visible at the output (valid_o) from cycle t+1: this is the
// second pipeline stage of the rule-update path. A push into a full FIFO is
// dropped and sets the sticky overflow_o flag. Depth and the drop-on-full
// policy are this design's choices; the document only names a FIFO channel.
module channel_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             push_i,
  input  logic [WIDTH-1:0] data_i,
  input  logic             pop_i,
  output logic             valid_o,
  output logic [WIDTH-1:0] data_o,
  output logic             full_o,
  output logic             overflow_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [PW-1:0]    wr_q, rd_q;
  logic [PW:0]      cnt_q;
  logic             do_push, do_pop;

  assign valid_o = (cnt_q != '0);
  assign full_o  = (cnt_q == (PW+1)'(DEPTH));
  assign data_o  = mem_q[rd_q];
  assign do_pop  = pop_i & valid_o;
  assign do_push = push_i & ~full_o;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wr_q       <= '0;
      rd_q       <= '0;
      cnt_q      <= '0;
      overflow_o <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (do_push) begin
        mem_q[wr_q] <= data_i;
        wr_q        <= incr(wr_q);
      end
      if (do_pop) rd_q <= incr(rd_q);
      cnt_q <= cnt_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
      if (push_i && full_o) overflow_o <= 1'b1;
    end
  end

endmodule
