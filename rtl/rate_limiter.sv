// rate_limiter: transfer counter that bounds the memory-bus use of one IP.
//
// Every transfer forwarded to memory (count_i high for one cycle) adds its
// number of data beats (amount_i: 1 for a single-word bus, len+1 for an AXI4
// burst) to the counter; every PERIOD cycles the counter is reduced by DEC, saturating
// at zero, so DEC/PERIOD is the long-run share of cycles the IP may use and
// LIMIT the burst it may issue above that share. below_limit_o is high while
// the counter is below LIMIT; at LIMIT further transfers are to be denied
// until a periodic decrement brings it below again. The counter saturates at
// its maximum value. Timing: below_limit_o is a function of the registered
// count only, so a transfer counted in cycle t affects cycle t+1.
// Counting transfers, periodic reduction and denying at the limit follow the
// DD-MPU description; the numbers are this design's choices.
module rate_limiter #(
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned LIMIT  = 16,
  parameter int unsigned PERIOD = 8,
  parameter int unsigned DEC    = 4
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic count_i,
  input  logic [8:0] amount_i,
  output logic below_limit_o
);

  localparam int unsigned TW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CNT_W-1:0] cnt_q;
  logic [TW-1:0]    tick_q;
  logic             tick;

  assign tick          = (tick_q == TW'(PERIOD - 1));
  assign below_limit_o = (cnt_q < CNT_W'(LIMIT));

  localparam int unsigned SW = ((CNT_W > 9) ? CNT_W : 9) + 1;
  localparam logic [SW-1:0] CMAX = SW'({CNT_W{1'b1}});

  logic [SW-1:0] cnt_d;

  always_comb begin
    cnt_d = SW'(cnt_q);
    if (count_i) begin
      cnt_d = cnt_d + SW'(amount_i);
      if (cnt_d > CMAX) cnt_d = CMAX;   // saturate
    end
    if (tick) cnt_d = (cnt_d > SW'(DEC)) ? cnt_d - SW'(DEC) : '0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q  <= '0;
      tick_q <= '0;
    end else begin
      tick_q <= tick ? '0 : tick_q + 1'b1;
      cnt_q  <= cnt_d[CNT_W-1:0];
    end
  end

endmodule
