// tb_reset_device: self-checking test of the consensual reset device (n = 3,
// quorum 2). It checks that one vote, or the same replica voting twice, does
// not reset; that the second replica's vote produces exactly one reset pulse
// and clears the votes; that the vote vector and reset counter read back;
// that a vote from a replica whose memory has RF set is refused and not
// counted; and that the pulse comes in the cycle after the deciding vote
// reaches the device.
module tb_reset_device;
  import ibft_pkg::*;

  localparam int unsigned N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t [N-1:0] s_req;
  axil_rsp_t [N-1:0] s_rsp;
  logic [N-1:0]      rf_any = '0;
  logic              dev_reset;

  reset_device #(.N(N)) dut (.*);

  axil_req_t r0, r1, r2;
  assign s_req = {r2, r1, r0};
  axil_master m0 (.clk, .req(r0), .rsp(s_rsp[0]));
  axil_master m1 (.clk, .req(r1), .rsp(s_rsp[1]));
  axil_master m2 (.clk, .req(r2), .rsp(s_rsp[2]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int   pulses = 0;
  longint cyc = 0, pulse_cyc = 0, req_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.b_req[2] && dut.b_we[2]) req_cyc <= cyc;
    if (dev_reset) begin
      pulses <= pulses + 1;
      pulse_cyc <= cyc;
    end
  end

  logic [31:0] rd;
  logic [1:0]  resp;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m0.write(16'h0, 32'h1, resp);
    check(resp == RESP_OKAY, "vote 0 accepted");
    m0.write(16'h0, 32'h1, resp);
    repeat (3) @(posedge clk);
    check(pulses == 0, "one replica cannot reset");
    m2.read(16'h0, rd, resp);
    check(rd[2:0] == 3'b001 && rd[31:16] == 16'd0, $sformatf("vote vector %h", rd));
    // a write with bit 0 clear is no vote
    m1.write(16'h0, 32'h0, resp);
    repeat (3) @(posedge clk);
    check(pulses == 0, "zero write is no vote");
    // RF set at replica 1: its vote is ignored
    rf_any = 3'b010;
    m1.write(16'h0, 32'h1, resp);
    check(resp == RESP_SLVERR, "vote under RF refused");
    repeat (3) @(posedge clk);
    check(pulses == 0, "vote under RF not counted");
    rf_any = 3'b000;
    // deciding vote, with the timing of the pulse
    m2.write(16'h0, 32'h1, resp);
    // bus request granted in cycle req_cyc, reset pulse in the next cycle
    check(pulses == 1 && pulse_cyc == req_cyc + 1,
          $sformatf("pulse at %0d, vote request at %0d", pulse_cyc, req_cyc));
    repeat (3) @(posedge clk);
    check(pulses == 1, "exactly one reset pulse");
    m0.read(16'h0, rd, resp);
    check(rd[2:0] == 3'b000 && rd[31:16] == 16'd1, $sformatf("votes cleared, count 1: %h", rd));
    // second round with replicas 1 and 2
    m1.write(16'h0, 32'h1, resp);
    m2.write(16'h0, 32'h1, resp);
    repeat (3) @(posedge clk);
    check(pulses == 2, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
