// axil_master: simulation-only AXI4-Lite master used by the testbenches.
// Call write(addr, data, resp) or read(addr, data, resp) from the testbench
// through the instance; each task runs one transaction and returns the
// response code. Requests are driven just after a rising edge; handshake
// signals are sampled at the falling edge before the rising edge that completes
// the handshake. A transaction that takes longer than 2000 cycles
// returns resp = 2'b11 (a code no slave here produces).
module axil_master
  import ibft_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] data,
                       output logic [1:0] resp, input logic [3:0] strb = 4'hF);
    int n;
    #1;  // never change a request in the same time step as a rising edge
    req.aw_valid = 1'b1;
    req.aw_addr  = addr;
    req.w_valid  = 1'b1;
    req.w_data   = data;
    req.w_strb   = strb;
    req.b_ready  = 1'b1;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!(rsp.aw_ready && rsp.w_ready) && n < 2000);
    @(posedge clk);
    #1;
    req.aw_valid = 1'b0;
    req.w_valid  = 1'b0;
    @(negedge clk);
    while (!rsp.b_valid && n < 2000) begin
      @(negedge clk);
      n++;
    end
    resp = (n >= 2000) ? 2'b11 : rsp.b_resp;
    @(posedge clk);
    #1;
    req.b_ready = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [DATA_W-1:0] data,
                      output logic [1:0] resp);
    int n;
    #1;
    req.ar_valid = 1'b1;
    req.ar_addr  = addr;
    req.r_ready  = 1'b1;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!rsp.ar_ready && n < 2000);
    @(posedge clk);
    #1;
    req.ar_valid = 1'b0;
    @(negedge clk);
    while (!rsp.r_valid && n < 2000) begin
      @(negedge clk);
      n++;
    end
    data = rsp.r_data;
    resp = (n >= 2000) ? 2'b11 : rsp.r_resp;
    @(posedge clk);
    #1;
    req.r_ready = 1'b0;
  endtask

endmodule
