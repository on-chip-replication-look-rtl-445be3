// tb_ibft_wrap: buffer wrap-around workload on the full-size design (n = 3,
// 64 slots of 16 words, default parameters). For ROUNDS rounds the three
// replica processes fill every request slot 0..61 with the normal phase,
// leadership rotating slot by slot (leader = slot mod n). In every seventh
// slot the leader is faulty and proposes something other than the client
// request: the followers detect the mismatch, time out with AE and the slot
// is skipped. After each slot a replica chosen in turn asks the trusted copy
// unit to apply it; the destination stalls at random and every write is
// compared with the agreed data. When the buffer is full all replicas write a
// checkpoint, alternating between slots 62 and 63 (double buffering), check
// f+1 matching checkpoints and vote for the reset. After the reset every slot
// shows only RF, the checkpoint words are still readable in every memory
// (the reset clears tags, not string contents), the replicas clear RF and the
// next round starts. The test counts copies, skips, resets, checkpoint
// reloads and RF clears and checks them against the numbers the schedule
// implies.
module tb_ibft_wrap;
  import ibft_pkg::*;

  localparam int unsigned ROUNDS    = 2;
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
  logic              dst_valid;
  logic              dst_ready = 1'b1;
  logic [31:0]       dst_addr, dst_data;

  ibft_top dut (.*);

  // the destination stalls at random
  always @(negedge clk) dst_ready <= 1'($urandom_range(0, 3) != 0);

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
  assign crash_req = '0;

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

  int n_copy = 0, n_skip = 0, n_reset = 0, n_rf_clear = 0, n_words = 0, n_ck_load = 0;

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

  msg_t req, bad, ck;
  logic [31:0] d;
  logic [1:0]  r;
  int          want_copy, want_skip, ck_slot;

  initial begin
    want_copy = 0;
    want_skip = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < ROUNDS; round++) begin
      for (int x = 0; x < SLOTS - 2; x++) begin
        int l, tk;
        l  = x % N;
        tk = (x + round) % N;
        req = make_req(x % 5, round * SLOTS + x, 1 + (x % (STR_WORDS - 4)));
        if (x % 7 == 5) begin
          bit m;
          bad = req;
          bad[4] = ~req[4];
          propose(l, x, bad);
          for (int k = 0; k < N; k++)
            if (k != l) begin
              follow(k, l, x, req, m);
              check(!m, $sformatf("round %0d slot %0d: mismatch seen", round, x));
              own_wr(k, faddr(x), 32'(1) << (ERR_OFS + a_bit(N)), r);
            end
          tc_cmd(tk, x, r);
          check(r == RESP_OKAY && got_addr.size() == 0,
                $sformatf("round %0d slot %0d skipped", round, x));
          if (r == RESP_OKAY) n_skip++;
          want_skip++;
        end else begin
          run_slot(x, req, 3'b111);
          tc_cmd(tk, x, r);
          check(r == RESP_OKAY, $sformatf("round %0d slot %0d copied", round, x));
          if (r == RESP_OKAY) n_copy++;
          n_words += got_addr.size();
          expect_copy(req, $sformatf("round %0d slot %0d", round, x));
          want_copy++;
        end
      end
      // checkpoint (double buffered) and reset
      ck_slot = SLOTS - 2 + round % 2;
      for (int w = 0; w < STR_WORDS; w++) ck[w] = 32'(round * 4096 + w);
      for (int k = 0; k < N; k++) begin
        for (int w = 0; w < STR_WORDS; w++) own_wr(k, saddr(ck_slot, w), ck[w], r);
        own_wr(k, faddr(ck_slot), 32'(1) << p_bit(k), r);
      end
      begin
        int nmatch;
        nmatch = 0;
        for (int j = 0; j < N; j++) begin
          bit same;
          same = 1'b1;
          for (int w = 0; w < STR_WORDS; w++) begin
            peer_rd(j, saddr(ck_slot, w), d);
            if (d != ck[w]) same = 1'b0;
          end
          if (same) nmatch++;
        end
        check(nmatch >= Q, $sformatf("round %0d: f+1 matching checkpoints", round));
      end
      rst_vote((round + 1) % N, r);
      rst_vote((round + 2) % N, r);
      check(r == RESP_OKAY, "deciding reset vote");
      repeat (2) @(posedge clk);
      begin
        int nrf;
        nrf = 0;
        for (int k = 0; k < N; k++)
          for (int s = 0; s < SLOTS; s++) begin
            peer_rd(k, faddr(s), d);
            if (d == (32'(1) << RF_BIT)) nrf++;
          end
        check(nrf == N * SLOTS, $sformatf("round %0d: all slots show only RF after reset", round));
        if (nrf == N * SLOTS) n_reset++;
      end
      // every replica reloads the checkpoint from the memories
      begin
        int nload;
        nload = 0;
        for (int j = 0; j < N; j++) begin
          bit same;
          same = 1'b1;
          for (int w = 0; w < STR_WORDS; w++) begin
            peer_rd(j, saddr(ck_slot, w), d);
            if (d != ck[w]) same = 1'b0;
          end
          if (same) nload++;
        end
        check(nload == N, $sformatf("round %0d: checkpoint readable after reset", round));
        if (nload == N) n_ck_load++;
      end
      for (int k = 0; k < N; k++)
        for (int s = 0; s < SLOTS; s++) begin
          own_wr(k, faddr(s), 32'(1) << RF_BIT, r);
          if (r == RESP_OKAY) n_rf_clear++;
        end
      mr0.read(16'h0, d, r);
      check(d[31:16] == 16'(round + 1), $sformatf("reset count %0d", d[31:16]));
    end
    check(n_copy == want_copy && n_copy > 0, $sformatf("%0d copies, want %0d", n_copy, want_copy));
    check(n_skip == want_skip && n_skip > 0, $sformatf("%0d skips, want %0d", n_skip, want_skip));
    check(n_reset == ROUNDS, "one reset per round");
    check(n_ck_load == ROUNDS, "checkpoint reloaded after every reset");
    check(n_rf_clear == ROUNDS * N * SLOTS, "every RF cleared");
    $display("workload: rounds=%0d copies=%0d skips=%0d words=%0d resets=%0d ck_load=%0d rf_clear=%0d",
             ROUNDS, n_copy, n_skip, n_words, n_reset, n_ck_load, n_rf_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
