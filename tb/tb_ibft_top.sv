// tb_ibft_top: end-to-end test of the iBFT hardware at its default size
// (n = 3, f = 1, 64 slots of 16 words), with every parameter left at its
// default. Three replica processes stand in for the cores: they run the
// protocol's normal phase over the AXI4-Lite ports (leader proposal, follower
// copy and compare, prepare, commit and accept flags), have the trusted copy
// unit apply each agreed slot, and finish with a checkpoint, a consensual
// reset and the restart after it. Along the way the test provokes, and
// counts, every mechanism the hardware provides:
//   string lock        a leader trying to change its proposal after P
//   tri-state          an error flag refused because agreement was given
//   seal               a late replica's A refused after f+1 accepted
//   copy / skip        trusted copy of an agreed slot, skip of a failed one
//   copy refused       an out-of-order and a repeated copy command
//   catch-up           a late replica reading the peers' decision
//   reset / RF         consensual reset, RF blocking writes, RF cleared
//   stale vote         a vote refused while the voter's memory has RF set
//   crash              two flipped RAM bits crash memory 0 while the trusted
//                      copy reads it; the copy finishes from memory 1 and the
//                      replicas see SLVERR from the crashed memory; memory 2
//                      is then crashed on purpose by f+1 crash votes
// A mechanism that never happens counts as a failure. Destination writes are
// compared with the agreed data.
module tb_ibft_top;
  import ibft_pkg::*;

  localparam int unsigned N         = 3;
  localparam int unsigned SLOTS     = 64;
  localparam int unsigned STR_WORDS = 16;
  localparam int unsigned Q         = 2;
  localparam logic [15:0] FLAGS     = 16'h4000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t [N-1:0] own_req, peer_req, rst_req, tc_req;
  axil_rsp_t [N-1:0] own_rsp, peer_rsp, rst_rsp, tc_rsp;
  axil_req_t [N-1:0] crash_req;
  axil_rsp_t [N-1:0] crash_rsp;
  logic [N-1:0]      mem_crashed;
  logic              dst_valid, dst_ready;
  logic [31:0]       dst_addr, dst_data;

  ibft_top dut (.*);

  assign dst_ready = 1'b1;

  // one bus master per port
  axil_master mo0 (.clk, .req(own_req[0]),  .rsp(own_rsp[0]));
  axil_master mo1 (.clk, .req(own_req[1]),  .rsp(own_rsp[1]));
  axil_master mo2 (.clk, .req(own_req[2]),  .rsp(own_rsp[2]));
  axil_master mp0 (.clk, .req(peer_req[0]), .rsp(peer_rsp[0]));
  axil_master mp1 (.clk, .req(peer_req[1]), .rsp(peer_rsp[1]));
  axil_master mp2 (.clk, .req(peer_req[2]), .rsp(peer_rsp[2]));
  axil_master mr0 (.clk, .req(rst_req[0]),  .rsp(rst_rsp[0]));
  axil_master mr1 (.clk, .req(rst_req[1]),  .rsp(rst_rsp[1]));
  axil_master mr2 (.clk, .req(rst_req[2]),  .rsp(rst_rsp[2]));
  axil_master mt0 (.clk, .req(tc_req[0]),   .rsp(tc_rsp[0]));
  axil_master mt1 (.clk, .req(tc_req[1]),   .rsp(tc_rsp[1]));
  axil_master mt2 (.clk, .req(tc_req[2]),   .rsp(tc_rsp[2]));
  axil_master mc0 (.clk, .req(crash_req[0]), .rsp(crash_rsp[0]));
  axil_master mc1 (.clk, .req(crash_req[1]), .rsp(crash_rsp[1]));
  axil_master mc2 (.clk, .req(crash_req[2]), .rsp(crash_rsp[2]));

  task automatic own_wr(int k, logic [15:0] a, logic [31:0] d, output logic [1:0] r);
    case (k)
      0: mo0.write(a, d, r);
      1: mo1.write(a, d, r);
      default: mo2.write(a, d, r);
    endcase
  endtask
  task automatic peer_rd(int j, logic [15:0] a, output logic [31:0] d);
    logic [1:0] r;
    case (j)
      0: mp0.read(a, d, r);
      1: mp1.read(a, d, r);
      default: mp2.read(a, d, r);
    endcase
  endtask
  task automatic rst_vote(int k, output logic [1:0] r);
    case (k)
      0: mr0.write(16'h0, 32'h1, r);
      1: mr1.write(16'h0, 32'h1, r);
      default: mr2.write(16'h0, 32'h1, r);
    endcase
  endtask
  task automatic tc_cmd(int k, int s, output logic [1:0] r);
    case (k)
      0: mt0.write(16'h0, 32'(s), r);
      1: mt1.write(16'h0, 32'(s), r);
      default: mt2.write(16'h0, 32'(s), r);
    endcase
  endtask

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_lock = 0, n_tristate = 0, n_seal = 0, n_copy = 0, n_skip = 0, n_refuse = 0;
  int n_catchup = 0, n_reset = 0, n_rf_block = 0, n_rf_clear = 0, n_stale_vote = 0;
  int n_crash = 0, n_crash_seen = 0;

  function automatic logic [15:0] saddr(int s, int w);
    return 16'((s * STR_WORDS + w) * 4);
  endfunction
  function automatic logic [15:0] faddr(int s);
    return FLAGS | 16'(s * 4);
  endfunction

  // destination log
  logic [31:0] got_addr [$], got_data [$];
  always_ff @(posedge clk)
    if (dst_valid && dst_ready) begin
      got_addr.push_back(dst_addr);
      got_data.push_back(dst_data);
    end

  // client requests: (client, seq, dest, size, data...)
  typedef logic [31:0] msg_t [STR_WORDS];
  function automatic msg_t make_req(int client, int seq, int size);
    msg_t m;
    for (int w = 0; w < STR_WORDS; w++) m[w] = 32'hFFFF_FFFF;
    m[0] = 32'(client);
    m[1] = 32'(seq);
    m[2] = 32'h2000_0000 + 32'(seq * 256);
    m[3] = 32'(size);
    for (int w = 4; w < STR_WORDS; w++) m[w] = 32'($urandom);
    return m;
  endfunction

  // leader l proposes message m in slot x
  task automatic propose(int l, int x, msg_t m);
    logic [1:0] r;
    for (int w = 0; w < STR_WORDS; w++) begin
      own_wr(l, saddr(x, w), m[w], r);
      check(r == RESP_OKAY, $sformatf("leader %0d writes slot %0d word %0d", l, x, w));
    end
    own_wr(l, faddr(x), 32'(1) << p_bit(l), r);
    check(r == RESP_OKAY, "leader sets P[l]");
  endtask

  // follower k: wait for P[l] of the leader, copy, compare with the client
  // request; on a match set P[l] and its own P[k], otherwise PE[l]
  task automatic follow(int k, int l, int x, msg_t client_req, output bit match);
    logic [31:0] d;
    logic [1:0]  r;
    msg_t        cp;
    int          polls;
    polls = 0;
    do begin
      peer_rd(l, faddr(x), d);
      polls++;
    end while (!d[p_bit(l)] && polls < 100);
    check(d[p_bit(l)], "follower sees the leader's P flag");
    match = 1'b1;
    for (int w = 0; w < STR_WORDS; w++) begin
      peer_rd(l, saddr(x, w), d);
      cp[w] = d;
      if (d != client_req[w]) match = 1'b0;
      own_wr(k, saddr(x, w), d, r);
    end
    if (match) own_wr(k, faddr(x), (32'(1) << p_bit(l)) | (32'(1) << p_bit(k)), r);
    else       own_wr(k, faddr(x), 32'(1) << (ERR_OFS + p_bit(l)), r);
    check(r == RESP_OKAY, "follower sets P[l] or PE[l]");
  endtask

  // rounds 2 and 3 for replica k over the replicas in 'live'
  task automatic agree(int k, int x, logic [N-1:0] live);
    logic [31:0] fw [N];
    logic [31:0] d, mine;
    logic [1:0]  r;
    int          np;
    // round 2: confirm the copies of the replicas that prepared
    for (int j = 0; j < N; j++) if (live[j]) peer_rd(j, faddr(x), fw[j]);
    for (int j = 0; j < N; j++) begin
      if (j != k && live[j] && fw[j][p_bit(j)]) begin
        bit same;
        same = 1'b1;
        for (int w = 0; w < STR_WORDS; w++) begin
          peer_rd(j, saddr(x, w), d);
          peer_rd(k, saddr(x, w), mine);
          if (d != mine) same = 1'b0;
        end
        if (same) own_wr(k, faddr(x), 32'(1) << p_bit(j), r);
      end
    end
    peer_rd(k, faddr(x), mine);
    np = $countones(mine[N-1:0]);
    if (np >= Q) own_wr(k, faddr(x), 32'(1) << c_bit(N, k), r);
  endtask

  task automatic commit(int k, int x, logic [N-1:0] live, output logic [1:0] ra);
    logic [31:0] fw, mine;
    logic [1:0]  r;
    int          nc;
    // round 3: count C flags of replicas that also show f+1 P flags
    for (int j = 0; j < N; j++) begin
      if (j != k && live[j]) begin
        peer_rd(j, faddr(x), fw);
        if (fw[c_bit(N, j)] && $countones(fw[N-1:0]) >= Q)
          own_wr(k, faddr(x), 32'(1) << c_bit(N, j), r);
      end
    end
    peer_rd(k, faddr(x), mine);
    nc = $countones(mine[2*N-1:N]);
    ra = 2'b11;
    if (nc >= Q) own_wr(k, faddr(x), 32'(1) << a_bit(N), ra);
  endtask

  // one complete normal-case slot with replicas 'live'; returns nothing
  task automatic run_slot(int x, msg_t req, logic [N-1:0] live);
    int l;
    bit m;
    logic [1:0] ra [N];
    l = x % N;
    propose(l, x, req);
    for (int k = 0; k < N; k++) if (k != l && live[k]) follow(k, l, x, req, m);
    for (int k = 0; k < N; k++) if (live[k]) agree(k, x, live);
    for (int k = 0; k < N; k++) if (live[k]) commit(k, x, live, ra[k]);
  endtask

  task automatic expect_copy(msg_t m, string tag);
    int sz;
    sz = int'(m[3]);
    check(got_addr.size() == sz, $sformatf("%s: %0d destination writes, want %0d", tag, got_addr.size(), sz));
    for (int i = 0; i < sz && i < got_addr.size(); i++)
      check(got_addr[i] == m[2] + 32'(4 * i) && got_data[i] == m[4 + i],
            $sformatf("%s: write %0d", tag, i));
    got_addr.delete();
    got_data.delete();
  endtask

  msg_t req0, req1, req2, bad1, req3, req4, ck;
  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- slot 0: all replicas, leader 0 ----
    req0 = make_req(7, 1, 5);
    run_slot(0, req0, 3'b111);
    // the leader cannot change its proposal any more
    own_wr(0, saddr(0, 4), 32'h0BAD_0BAD, r);
    check(r == RESP_SLVERR, "proposal frozen after P");
    if (r == RESP_SLVERR) n_lock++;
    // a replica that prepared cannot turn P into PE
    own_wr(1, faddr(0), 32'(1) << (ERR_OFS + p_bit(0)), r);
    check(r == RESP_SLVERR, "PE refused after P");
    if (r == RESP_SLVERR) n_tristate++;
    // the first two A flags seal the slot; the third A write is refused
    peer_rd(2, faddr(0), d);
    check(!d[a_bit(N)], "replica 2 A refused by seal");
    if (!d[a_bit(N)]) n_seal++;
    tc_cmd(2, 0, r);
    check(r == RESP_OKAY, "slot 0 trusted copy");
    if (r == RESP_OKAY) n_copy++;
    expect_copy(req0, "slot 0");
    tc_cmd(0, 0, r);
    check(r == RESP_SLVERR, "slot 0 copied only once");
    if (r == RESP_SLVERR) n_refuse++;

    // ---- slot 1: faulty leader 1 proposes something else than the client ----
    req1 = make_req(8, 2, 4);
    bad1 = req1;
    bad1[4] = ~req1[4];
    propose(1, 1, bad1);
    begin
      bit m0, m2;
      follow(0, 1, 1, req1, m0);
      follow(2, 1, 1, req1, m2);
      check(!m0 && !m2, "followers detect the mismatch");
    end
    // copying slot 2 before slot 1 is decided is refused
    // (slot 2 is not agreed yet either; slot 1 not executed)
    tc_cmd(1, 2, r);
    check(r == RESP_SLVERR, "out of order copy refused");
    if (r == RESP_SLVERR) n_refuse++;
    // timeout: replicas 0 and 2 set AE
    own_wr(0, faddr(1), 32'(1) << (ERR_OFS + a_bit(N)), r);
    own_wr(2, faddr(1), 32'(1) << (ERR_OFS + a_bit(N)), r);
    // the faulty leader can no longer accept the slot
    own_wr(1, faddr(1), 32'(1) << a_bit(N), r);
    check(r == RESP_SLVERR, "faulty leader's A refused after AE quorum");
    if (r == RESP_SLVERR) n_seal++;
    tc_cmd(0, 1, r);
    check(r == RESP_OKAY && got_addr.size() == 0, "slot 1 skipped");
    if (r == RESP_OKAY) n_skip++;

    // ---- slot 2: leader 2, replica 1 late (catch-up scenario) ----
    req2 = make_req(9, 3, 12);
    run_slot(2, req2, 3'b101);
    tc_cmd(0, 2, r);
    check(r == RESP_OKAY, "slot 2 copied with one replica late");
    expect_copy(req2, "slot 2");
    // the late replica catches up: it reads the peers' A flags and copies
    begin
      int na;
      na = 0;
      for (int j = 0; j < N; j++) begin
        peer_rd(j, faddr(2), d);
        if (d[a_bit(N)]) na++;
      end
      for (int w = 0; w < STR_WORDS; w++) begin
        peer_rd(0, saddr(2, w), d);
        own_wr(1, saddr(2, w), d, r);
      end
      own_wr(1, faddr(2), 32'(1) << a_bit(N), r);
      check(na >= Q && r == RESP_SLVERR, "late replica sees the decision, slot sealed");
      if (na >= Q) n_catchup++;
    end

    // ---- checkpoint in the last slot of every replica, then reset ----
    for (int w = 0; w < STR_WORDS; w++) ck[w] = 32'h00C0_0000 + 32'(w);
    for (int k = 0; k < N; k++) begin
      for (int w = 0; w < STR_WORDS; w++) own_wr(k, saddr(SLOTS - 1, w), ck[w], r);
      own_wr(k, faddr(SLOTS - 1), 32'(1) << p_bit(k), r);
    end
    begin
      int nmatch;
      nmatch = 0;
      for (int j = 0; j < N; j++) begin
        bit same;
        same = 1'b1;
        peer_rd(j, faddr(SLOTS - 1), d);
        if (!d[p_bit(j)]) same = 1'b0;
        for (int w = 0; w < STR_WORDS; w++) begin
          peer_rd(j, saddr(SLOTS - 1, w), d);
          if (d != ck[w]) same = 1'b0;
        end
        if (same) nmatch++;
      end
      check(nmatch >= Q, "f+1 matching checkpoints");
    end
    rst_vote(0, r);
    check(r == RESP_OKAY, "vote 0");
    peer_rd(0, faddr(0), d);
    check(d[p_bit(0)] && !d[RF_BIT], "one vote does not reset");
    rst_vote(1, r);
    repeat (2) @(posedge clk);
    peer_rd(0, faddr(0), d);
    check(d == 32'h0000_8000, $sformatf("memory 0 slot 0 after reset: %h", d));
    if (d == 32'h0000_8000) n_reset++;
    // the lagging replica's vote arrives after the reset: ignored
    rst_vote(2, r);
    check(r == RESP_SLVERR, "stale vote refused");
    if (r == RESP_SLVERR) n_stale_vote++;
    // writes fail until RF is cleared
    own_wr(0, saddr(0, 0), 32'h1, r);
    check(r == RESP_SLVERR, "write blocked by RF");
    if (r == RESP_SLVERR) n_rf_block++;
    for (int k = 0; k < N; k++)
      for (int s = 0; s < SLOTS; s++) begin
        own_wr(k, faddr(s), 32'(1) << RF_BIT, r);
        if (r == RESP_OKAY) n_rf_clear++;
      end
    check(n_rf_clear == N * SLOTS, "all RF flags cleared");

    // ---- slot 0 again after the reset ----
    req3 = make_req(7, 4, 2);
    run_slot(0, req3, 3'b111);
    tc_cmd(1, 0, r);
    check(r == RESP_OKAY, "slot 0 copied after reset");
    if (r == RESP_OKAY) n_copy++;
    expect_copy(req3, "slot 0 after reset");

    // ---- slot 1: memory 0 crashes while the trusted copy reads it ----
    req4 = make_req(8, 5, 10);
    run_slot(1, req4, 3'b111);
    peer_rd(0, faddr(1), d);
    check(d[a_bit(N)], "memory 0 holds A of slot 1 (first copy source)");
    dut.g_tile[0].u_tile.u_ram.mem[1 * STR_WORDS + 7][2] = ~dut.g_tile[0].u_tile.u_ram.mem[1 * STR_WORDS + 7][2];
    dut.g_tile[0].u_tile.u_ram.mem[1 * STR_WORDS + 7][5] = ~dut.g_tile[0].u_tile.u_ram.mem[1 * STR_WORDS + 7][5];
    check(mem_crashed == '0, "no memory crashed before the read");
    tc_cmd(2, 1, r);
    check(r == RESP_OKAY, "slot 1 copied despite the source crash");
    expect_copy(req4, "slot 1 across crash");
    check(mem_crashed == 3'b001, $sformatf("memory 0 crashed: %b", mem_crashed));
    if (mem_crashed[0]) n_crash++;
    mp0.read(faddr(1), d, r);
    check(r == RESP_SLVERR && d == 0, "replicas see the crash as SLVERR");
    if (r == RESP_SLVERR) n_crash_seen++;
    mo0.write(saddr(2, 0), 32'h1, r);
    check(r == RESP_SLVERR, "owner of the crashed memory cannot write");
    // replicas 0 and 1 agree to crash memory 2: one vote is not enough
    mc1.write(16'h0, 32'b100, r);
    repeat (3) @(posedge clk);
    check(!mem_crashed[2], "one crash vote does nothing");
    mc0.write(16'h0, 32'b100, r);
    @(posedge clk);
    mp2.read(saddr(1, 0), d, r);
    check(r == RESP_SLVERR && mem_crashed == 3'b101, "memory 2 crashed by f+1 votes");
    if (r == RESP_SLVERR) n_crash++;

    check(n_lock > 0, "string lock happened");
    check(n_tristate > 0, "tri-state refusal happened");
    check(n_seal > 0, "seal happened");
    check(n_copy > 0, "copy happened");
    check(n_skip > 0, "skip happened");
    check(n_refuse > 0, "copy refusal happened");
    check(n_catchup > 0, "catch-up happened");
    check(n_reset > 0, "reset happened");
    check(n_rf_block > 0, "RF block happened");
    check(n_stale_vote > 0, "stale vote happened");
    check(n_crash > 0 && n_crash_seen > 0, "crash happened and was seen");
    $display("mechanisms: lock=%0d tristate=%0d seal=%0d copy=%0d skip=%0d refuse=%0d catchup=%0d reset=%0d rf_block=%0d rf_clear=%0d stale_vote=%0d crash=%0d crash_seen=%0d",
             n_lock, n_tristate, n_seal, n_copy, n_skip, n_refuse, n_catchup, n_reset,
             n_rf_block, n_rf_clear, n_stale_vote, n_crash, n_crash_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
