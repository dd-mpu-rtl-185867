// axi_tb_tasks.svh: AXI4 master tasks shared by the AXI testbenches.
// Included inside a testbench module that declares clk, ip_req (axi_req_t)
// and ip_rsp (axi_rsp_t). Signals change on the falling clock edge and are
// sampled just before the rising one. A write drives AW and W at the same
// time, then waits for B; a read drives AR and collects R beats. Both check
// the response ID.

task automatic axi_write(input logic [3:0] id, input logic [31:0] addr, input logic [7:0] len,
                         input axi_burst_e burst, input logic [31:0] data [$],
                         output axi_resp_e resp, output bit id_ok);
  @(negedge clk);
  ip_req.aw.id = id; ip_req.aw.addr = addr; ip_req.aw.len = len; ip_req.aw.size = 3'd2;
  ip_req.aw.burst = burst; ip_req.aw_valid = 1;
  fork
    begin
      #1;
      while (!ip_rsp.aw_ready) begin @(negedge clk); #1; end
      @(negedge clk); ip_req.aw_valid = 0;
    end
    begin
      for (int b = 0; b <= int'(len); b++) begin
        ip_req.w.data = data[b]; ip_req.w.strb = 4'hF; ip_req.w.last = (b == int'(len));
        ip_req.w_valid = 1;
        #1;
        while (!ip_rsp.w_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      ip_req.w_valid = 0;
    end
  join
  ip_req.b_ready = 1;
  #1;
  while (!ip_rsp.b_valid) begin @(negedge clk); #1; end
  resp = ip_rsp.b.resp; id_ok = (ip_rsp.b.id == id);
  @(negedge clk); ip_req.b_ready = 0;
endtask

task automatic axi_read(input logic [3:0] id, input logic [31:0] addr, input logic [7:0] len,
                        input axi_burst_e burst, output logic [31:0] data [$], output bit ok);
  int beats = 0;
  ok = 1;
  data = {};
  @(negedge clk);
  ip_req.ar.id = id; ip_req.ar.addr = addr; ip_req.ar.len = len; ip_req.ar.size = 3'd2;
  ip_req.ar.burst = burst; ip_req.ar_valid = 1;
  #1;
  while (!ip_rsp.ar_ready) begin @(negedge clk); #1; end
  @(negedge clk); ip_req.ar_valid = 0; ip_req.r_ready = 1;
  while (beats <= int'(len)) begin
    #1;
    if (ip_rsp.r_valid) begin
      data.push_back(ip_rsp.r.data);
      if (ip_rsp.r.id != id) ok = 0;
      if (ip_rsp.r.last != (beats == int'(len))) ok = 0;
      beats++;
    end
    @(negedge clk);
  end
  ip_req.r_ready = 0;
endtask
