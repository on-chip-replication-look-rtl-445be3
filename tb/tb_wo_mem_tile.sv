// tb_wo_mem_tile: self-checking test of one write-once memory tile through
// its AXI4-Lite ports. It checks that the owner can write and read strings and
// flags, that peers read the same contents, that a string is frozen once a
// flag of its slot is set, that the tri-state rule refuses the opposite form
// of a set flag, that the peer port has no write path, that trusted copy reads
// return string words while peer reads keep working, that the consensual reset
// clears flags, sets RF and blocks writes until RF is cleared, that a
// sealed slot refuses flag writes, and the crash behaviour: a single flipped
// RAM bit is corrected without a crash, two flipped bits in a byte crash the
// tile on the first read, a crashed tile answers every access with SLVERR and
// zero data and takes no writes, only power-on reset revives it (with a
// cleared RAM), and the crash input crashes it on purpose.
module tb_wo_mem_tile;
  import ibft_pkg::*;

  localparam int unsigned N         = 3;
  localparam int unsigned SLOTS     = 8;
  localparam int unsigned STR_WORDS = 16;
  localparam logic [15:0] FLAGS     = 16'h4000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             dev_reset = 1'b0;
  logic [SLOTS-1:0] seal = '0;
  logic             crash = 1'b0, crashed;
  axil_req_t        own_req, peer_req;
  axil_rsp_t        own_rsp, peer_rsp;
  logic             tcr_req = 1'b0, tcr_rvalid, rf_any;
  logic [6:0]       tcr_addr = '0;
  logic [31:0]      tcr_rdata;
  logic [SLOTS-1:0] a_flags, ae_flags;

  wo_mem_tile #(.N(N), .SLOTS(SLOTS), .STR_WORDS(STR_WORDS)) dut (.*);
  axil_master mo (.clk, .req(own_req), .rsp(own_rsp));
  axil_master mp (.clk, .req(peer_req), .rsp(peer_rsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] saddr(int s, int w);
    return 16'((s * STR_WORDS + w) * 4);
  endfunction
  function automatic logic [15:0] faddr(int s);
    return FLAGS | 16'(s * 4);
  endfunction
  function automatic logic [31:0] pat(int s, int w, int gen);
    return 32'h1000_0000 * 32'(gen) + 32'(s * 256 + w);
  endfunction

  logic [31:0] rd;
  logic [1:0]  resp;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // strings of all slots
    for (int s = 0; s < SLOTS; s++)
      for (int w = 0; w < STR_WORDS; w++) begin
        mo.write(saddr(s, w), pat(s, w, 1), resp);
        if (w == 0) check(resp == RESP_OKAY, "string write to clear slot accepted");
      end
    for (int s = 0; s < SLOTS; s++) begin
      int w;
      w = $urandom_range(0, STR_WORDS - 1);
      mo.read(saddr(s, w), rd, resp);
      check(rd == pat(s, w, 1), $sformatf("owner reads string %0d/%0d", s, w));
      mp.read(saddr(s, w), rd, resp);
      check(rd == pat(s, w, 1), $sformatf("peer reads string %0d/%0d", s, w));
    end
    // P[0] in slot 0 freezes its string
    mo.write(faddr(0), 32'h0000_0001, resp);
    check(resp == RESP_OKAY, "set P[0]");
    mo.write(saddr(0, 3), 32'hDEAD_BEEF, resp);
    check(resp == RESP_SLVERR, "string write after flag is refused");
    mp.read(saddr(0, 3), rd, resp);
    check(rd == pat(0, 3, 1), "frozen string unchanged");
    mo.write(saddr(1, 3), 32'hCAFE_0001, resp);
    check(resp == RESP_OKAY, "other slot still writable");
    mp.read(saddr(1, 3), rd, resp);
    check(rd == 32'hCAFE_0001, "other slot written");
    // tri-state: PE[0] after P[0] refused, P[1] accepted, bits cannot be cleared
    mo.write(faddr(0), 32'h0001_0000, resp);
    check(resp == RESP_SLVERR, "PE after P refused");
    mo.write(faddr(0), 32'h0000_0002, resp);
    check(resp == RESP_OKAY, "P[1] accepted");
    mo.write(faddr(0), 32'h0000_0000, resp);
    mp.read(faddr(0), rd, resp);
    check(rd == 32'h0000_0003, $sformatf("peer sees flags P[0],P[1]: %h", rd));
    // A flag output
    mo.write(faddr(2), 32'h0000_0040, resp);
    mo.write(faddr(3), 32'h0040_0000, resp);
    check(a_flags == 8'b0000_0100 && ae_flags == 8'b0000_1000, "A/AE outputs");
    // the peer port has no write path
    @(posedge clk);
    #1 peer_req.aw_valid = 1'b1; peer_req.w_valid = 1'b1; peer_req.aw_addr = saddr(4, 0);
    peer_req.w_data = 32'h0BAD_0BAD; peer_req.w_strb = 4'hF;
    repeat (6) begin
      @(negedge clk);
      check(!peer_rsp.aw_ready && !peer_rsp.w_ready && !peer_rsp.b_valid, "peer write not accepted");
    end
    #1 peer_req.aw_valid = 1'b0; peer_req.w_valid = 1'b0;
    mo.read(saddr(4, 0), rd, resp);
    check(rd == pat(4, 0, 1), "peer write had no effect");
    // trusted copy read port, with a peer read running at the same time
    fork
      begin
        for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          tcr_req = 1'b1; tcr_addr = 7'(5 * STR_WORDS + i);
          @(negedge clk);
          tcr_req = 1'b0;
          check(tcr_rvalid && tcr_rdata == pat(5, i, 1), $sformatf("trusted copy read word %0d: %h", i, tcr_rdata));
        end
      end
      begin
        mp.read(saddr(6, 7), rd, resp);
        check(rd == pat(6, 7, 1) && resp == RESP_OKAY, "peer read beside trusted copy reads");
      end
    join
    // consensual reset
    @(posedge clk);
    #1 dev_reset = 1'b1;
    @(posedge clk);
    #1 dev_reset = 1'b0;
    check(rf_any, "RF set after reset");
    mp.read(faddr(0), rd, resp);
    check(rd == 32'h0000_8000, $sformatf("flags cleared, RF set: %h", rd));
    mo.write(saddr(0, 3), 32'h1234_5678, resp);
    check(resp == RESP_SLVERR, "string write refused while RF");
    mo.write(faddr(0), 32'h0000_0001, resp);
    check(resp == RESP_SLVERR, "flag write refused while RF");
    mo.write(faddr(0), 32'h0000_8000, resp);
    check(resp == RESP_OKAY, "owner clears RF");
    mo.write(saddr(0, 3), 32'h1234_5678, resp);
    check(resp == RESP_OKAY, "string writable again after reset");
    mp.read(saddr(0, 3), rd, resp);
    check(rd == 32'h1234_5678, "new string value");
    // seal
    for (int s = 1; s < SLOTS; s++) mo.write(faddr(s), 32'h0000_8000, resp);
    check(!rf_any, "all RF cleared");
    seal[1] = 1'b1;
    mo.write(faddr(1), 32'h0000_0001, resp);
    check(resp == RESP_SLVERR, "sealed slot refuses flags");
    mo.write(faddr(2), 32'h0000_0001, resp);
    check(resp == RESP_OKAY, "unsealed slot takes flags");
    // crash: single flip corrected, double flip crashes
    check(!crashed, "not crashed before errors");
    dut.u_ram.mem[6 * STR_WORDS + 1][3] = ~dut.u_ram.mem[6 * STR_WORDS + 1][3];
    mp.read(saddr(6, 1), rd, resp);
    check(resp == RESP_OKAY && rd == pat(6, 1, 1) && !crashed, "single flip corrected");
    dut.u_ram.mem[5 * STR_WORDS + 2][20] = ~dut.u_ram.mem[5 * STR_WORDS + 2][20];
    dut.u_ram.mem[5 * STR_WORDS + 2][22] = ~dut.u_ram.mem[5 * STR_WORDS + 2][22];
    mo.read(faddr(5), rd, resp);
    check(resp == RESP_OKAY && !crashed, "error not seen before the word is read");
    mp.read(saddr(5, 2), rd, resp);
    check(resp == RESP_SLVERR && rd == 0, $sformatf("uncorrectable read answered SLVERR: %h", rd));
    check(crashed, "tile crashed");
    mp.read(faddr(2), rd, resp);
    check(resp == RESP_SLVERR && rd == 0, "crashed tile: peer flag read refused");
    mo.read(saddr(6, 1), rd, resp);
    check(resp == RESP_SLVERR && rd == 0, "crashed tile: owner read refused");
    mo.write(faddr(4), 32'h0000_0001, resp);
    check(resp == RESP_SLVERR, "crashed tile: flag write refused");
    check(dut.u_tag.agr_q[4] == '0, "crashed tile: flag not set");
    // power-on reset revives it
    @(posedge clk);
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    check(!crashed, "power-on reset clears the crash");
    mp.read(saddr(5, 2), rd, resp);
    check(resp == RESP_OKAY && rd == 0 && !crashed, "RAM cleared after power-on reset");
    // deliberate crash
    @(posedge clk);
    #1 crash = 1'b1;
    @(posedge clk);
    #1 crash = 1'b0;
    mo.read(saddr(0, 0), rd, resp);
    check(resp == RESP_SLVERR && crashed, "crash input crashes the tile");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
