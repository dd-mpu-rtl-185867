// reg_trigger: trigger module that matches writes to control registers.
//
// A trigger turns monitored transfers into inputs for dynamic rules. This one
// is the simple address-matching kind: a write to ADDR_REG yields an Address
// value, a write to LEN_REG a Length value and a write to EN_REG an Enable
// value (bit 0 of the data: 1 enables, 0 disables); the written data is the
// value. Any other transfer, and every read, yields DET_INVALID. Each match
// can be switched off with USE_ADDR / USE_LEN / USE_EN.
// Timing: purely combinational; the channel FIFO behind it registers the
// result.
// Matching one register address and passing the written data on follows the
// DD-MPU description; matching a length and an enable register in the same
// trigger is this design's extension so one trigger can feed a rule whose
// address and length are both dynamic.
module reg_trigger
  import ddmpu_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR_REG = 32'hB0,
  parameter logic [ADDR_W-1:0] LEN_REG  = 32'hB4,
  parameter logic [ADDR_W-1:0] EN_REG   = 32'h0,
  parameter bit                USE_ADDR = 1'b1,
  parameter bit                USE_LEN  = 1'b1,
  parameter bit                USE_EN   = 1'b0
) (
  input  trace_t trace_i,
  output det_t   det_o
);

  always_comb begin
    det_o.kind  = DET_INVALID;
    det_o.value = trace_i.data;
    if (trace_i.valid && trace_i.write) begin
      if (USE_ADDR && trace_i.addr == ADDR_REG) det_o.kind = DET_ADDRESS;
      else if (USE_LEN && trace_i.addr == LEN_REG) det_o.kind = DET_LENGTH;
      else if (USE_EN && trace_i.addr == EN_REG) det_o.kind = DET_ENABLE;
    end
  end

endmodule
