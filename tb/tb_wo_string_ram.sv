// tb_wo_string_ram: self-checking test of the string RAM with its ANDed write
// enable and its error code. After reset the clearing sweep must take DEPTH
// cycles and leave every word reading zero. Random writes (random strobes,
// permission granted or refused) and reads on both ports are checked against
// a reference array: a refused write must leave the word untouched, port A
// reads first on a write, and read data appears one cycle after the enable.
// The byte code is checked on its own: every pair of code words differs in at
// least 4 bits, every single flipped bit is corrected and every double flip
// is reported uncorrectable. Finally bits of stored words are flipped: one
// flip per byte is corrected on both ports, two flips in a byte raise a_ue and
// b_ue.
module tb_wo_string_ram;
  import ibft_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        a_en = 0, a_we = 0, a_allow = 0, b_en = 0;
  logic [5:0]  a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;
  logic [3:0]  a_wstrb = 0;
  logic        init_done, a_ue, b_ue;

  wo_string_ram #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] refm [DEPTH];

  initial begin
    int n;
    // clearing sweep
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0;
    while (!init_done && n < 10 * DEPTH) begin
      @(posedge clk);
      #1 n++;
    end
    check(n == DEPTH, $sformatf("clearing sweep took %0d cycles, want %0d", n, DEPTH));
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = 6'(i); b_en = 1; b_addr = 6'(DEPTH - 1 - i);
      @(posedge clk);
      #1 check(a_rdata == 0 && b_rdata == 0 && !a_ue && !b_ue, $sformatf("cleared word %0d", i));
    end
    // fill with known values through permitted writes
    for (int i = 0; i < DEPTH; i++) begin
      refm[i] = 32'(i * 32'h01010101);
      @(negedge clk);
      a_en = 1; a_we = 1; a_allow = 1; a_addr = 6'(i); a_wdata = refm[i]; a_wstrb = 4'hF;
    end
    @(negedge clk);
    a_en = 0;
    for (int it = 0; it < 500; it++) begin
      int aa, bb;
      logic [31:0] exp_a, exp_b, d;
      logic [3:0]  s;
      bit w, al;
      aa = $urandom_range(0, DEPTH - 1);
      bb = $urandom_range(0, DEPTH - 1);
      w  = $urandom_range(0, 1);
      al = $urandom_range(0, 1);
      d  = $urandom;
      s  = 4'($urandom);
      @(negedge clk);
      a_en = 1; a_we = w; a_allow = al; a_addr = 6'(aa); a_wdata = d; a_wstrb = s;
      b_en = 1; b_addr = 6'(bb);
      exp_a = refm[aa];
      exp_b = refm[bb];
      if (w && al)
        for (int k = 0; k < 4; k++) if (s[k]) refm[aa][8*k +: 8] = d[8*k +: 8];
      @(posedge clk);
      #1;
      check(a_rdata == exp_a, $sformatf("port A read %0d got %h want %h", aa, a_rdata, exp_a));
      check(b_rdata == exp_b, $sformatf("port B read %0d got %h want %h", bb, b_rdata, exp_b));
      check(!a_ue && !b_ue, "no error reported for clean data");
    end
    @(negedge clk);
    a_en = 0; b_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_en = 1; b_addr = 6'(i);
      @(posedge clk);
      #1 check(b_rdata == refm[i], $sformatf("final word %0d", i));
    end
    // the byte code alone
    for (int x = 0; x < 256; x++) begin
      logic [ECC_W-1:0] cx, cy, cf;
      ecc_dec_t         r;
      int               bad;
      cx  = ecc_encode(8'(x));
      r   = ecc_decode(cx);
      bad = 0;
      if (r.data != 8'(x) || r.ce || r.ue) bad++;
      for (int y = x + 1; y < 256; y++) begin
        cy = ecc_encode(8'(y));
        if ($countones(cx ^ cy) < 4) bad++;
      end
      for (int i = 0; i < ECC_W; i++) begin
        cf = cx;
        cf[i] = ~cf[i];
        r = ecc_decode(cf);
        if (r.data != 8'(x) || !r.ce || r.ue) bad++;
        for (int j = i + 1; j < ECC_W; j++) begin
          cf = cx;
          cf[i] = ~cf[i];
          cf[j] = ~cf[j];
          r = ecc_decode(cf);
          if (!r.ue) bad++;
        end
      end
      check(bad == 0, $sformatf("code of byte %02h: %0d violations", x, bad));
    end
    // flipped bits in the RAM
    for (int i = 0; i < DEPTH; i++) begin
      int b0, b1, lane;
      bit two;
      two  = 1'($urandom_range(0, 1));
      lane = $urandom_range(0, 3);
      b0   = $urandom_range(0, ECC_W - 1);
      b1   = (b0 + $urandom_range(1, ECC_W - 1)) % ECC_W;
      @(negedge clk);
      a_en = 0; b_en = 0;
      for (int l = 0; l < 4; l++) begin
        dut.mem[i][ECC_W * l + b0] = ~dut.mem[i][ECC_W * l + b0];
        if (l == lane && two) dut.mem[i][ECC_W * l + b1] = ~dut.mem[i][ECC_W * l + b1];
      end
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = 6'(i); b_en = 1; b_addr = 6'(i);
      @(posedge clk);
      #1;
      if (two) check(a_ue && b_ue, $sformatf("double flip in word %0d lane %0d detected", i, lane));
      else     check(!a_ue && !b_ue && a_rdata == refm[i] && b_rdata == refm[i],
                     $sformatf("single flips in word %0d corrected: %h %h", i, a_rdata, b_rdata));
    end
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
