// trusted_copy: moves an agreed-upon value out of the write-once memories into
// the place where the platform uses it (a page table entry, a base register,
// a configuration word), once, and in slot order.
//
// A slot's message is read as a (destination, size, data) triplet: string word
// 2 is the destination byte address, word 3 the size in 32-bit words, words 4
// onwards the data (words 0 and 1 hold client id and sequence number). Any
// replica may ask for slot l by writing l to its command port. The unit works
// on one command at a time, which makes each copy atomic against the others:
//   1. agreement: the A flag of slot l is set in f+1 memories, or else the
//      slot is finally skipped: its AE flag is set in f+1 memories;
//   2. order: slot l-1 carries the executed tag (slot 0 needs none);
//   3. once: slot l does not carry the executed tag yet.
// If any check fails the command is refused (SLVERR). Otherwise slot l is
// tagged executed, and on agreement its data words are copied from the lowest
// numbered memory that has its A flag set and has not crashed to the
// destination write port, one word at a time with a valid/ready handshake. If
// that memory crashes during the copy, the unit continues from the next such
// memory (their strings were compared in the commit round); if none is left
// the command ends refused, with the slot already tagged. An agreed slot whose
// agreeing memories have all crashed before the command is refused untagged. The executed tags live in this unit,
// are writable only by it, and are cleared by the consensual reset.
// The three conditions, the triplet and one-copy-at-a-time follow the
// protocol; the string layout, the choice of source memory, the clipping of
// the size to STR_WORDS-4 and the register layout are this design's choices.
// Registers (per replica port): write = command, data bits SW-1:0 = slot; the
// write response arrives when the command is finished (OKAY: copied or
// skipped, SLVERR: refused). Read at byte address 4*s: bit 31 = executed tag
// of slot s, bits 15:8 = last slot this port asked for, bits 1:0 = its result
// (tc_result_e).
// Timing: a command takes 3 cycles to decide, then 4 RAM reads of setup plus
// 3 cycles per copied word when the destination is always ready.
module trusted_copy
  import ibft_pkg::*;
#(
  parameter int unsigned N         = 3,
  parameter int unsigned SLOTS     = 64,
  parameter int unsigned STR_WORDS = 16,
  localparam int unsigned SW       = $clog2(SLOTS),
  localparam int unsigned RW       = $clog2(SLOTS * STR_WORDS),
  localparam int unsigned WW       = $clog2(STR_WORDS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    dev_reset,
  input  axil_req_t [N-1:0]       s_req,
  output axil_rsp_t [N-1:0]       s_rsp,
  input  logic [N-1:0][SLOTS-1:0] a_flags,
  input  logic [N-1:0][SLOTS-1:0] ae_flags,
  input  logic [N-1:0]            crashed,
  // string read ports, one per write-once memory
  output logic [N-1:0]            rd_req,
  output logic [RW-1:0]           rd_addr,
  input  logic [N-1:0]            rd_rvalid,
  input  logic [N-1:0][DATA_W-1:0] rd_rdata,
  // destination write port
  output logic                    dst_valid,
  output logic [DATA_W-1:0]       dst_addr,
  output logic [DATA_W-1:0]       dst_data,
  input  logic                    dst_ready
);

  localparam int unsigned Q        = quorum(N);
  localparam int unsigned CW       = $clog2(N + 1);
  localparam int unsigned KW       = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned MAX_DATA = STR_WORDS - STR_DATA;

  // ---------------- per-replica AXI-Lite ports ----------------
  logic [N-1:0]              b_req, b_we, b_gnt, b_rvalid, b_err;
  logic [N-1:0][ADDR_W-1:0]  b_addr;
  logic [N-1:0][DATA_W-1:0]  b_wdata, b_rdata;
  logic [N-1:0][3:0]         b_wstrb;

  for (genvar k = 0; k < N; k++) begin : g_port
    axil_slave u_port (
      .clk, .rst_n, .s_req(s_req[k]), .s_rsp(s_rsp[k]),
      .b_req(b_req[k]), .b_we(b_we[k]), .b_addr(b_addr[k]), .b_wdata(b_wdata[k]),
      .b_wstrb(b_wstrb[k]), .b_gnt(b_gnt[k]), .b_rvalid(b_rvalid[k]),
      .b_rdata(b_rdata[k]), .b_err(b_err[k])
    );
  end

  // ---------------- command engine ----------------
  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_RD, S_WAIT, S_WR, S_DONE} state_e;
  state_e state_q;

  logic [SLOTS-1:0]      exec_q;
  logic [KW-1:0]         port_q, src_q, rr_q;
  logic [SW-1:0]         slot_q;
  logic [WW-1:0]         w_q;
  logic [DATA_W-1:0]     dest_q, data_q;
  logic [WW:0]           size_q;
  tc_result_e            res_q;
  tc_result_e [N-1:0]    last_res_q;
  logic [N-1:0][SW-1:0]  last_slot_q;

  // pick the next command, round robin starting after the last served port
  logic [N-1:0] cmd_pend;
  logic         pick_ok;
  logic [KW-1:0] pick;
  always_comb begin
    for (int k = 0; k < N; k++) cmd_pend[k] = b_req[k] && b_we[k];
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = 1; i <= N; i++) begin
      int unsigned k;
      k = (int'(rr_q) + i) % N;
      if (!pick_ok && cmd_pend[k]) begin
        pick_ok = 1'b1;
        pick    = KW'(k);
      end
    end
  end

  // agreement state of the latched slot
  logic [CW-1:0] na, ne;
  logic          agree, skip, prev_ok, live_a;
  logic [KW-1:0] first_a;
  always_comb begin
    na      = '0;
    ne      = '0;
    first_a = '0;
    live_a  = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      na = na + CW'(a_flags[k][slot_q]);
      ne = ne + CW'(ae_flags[k][slot_q]);
      if (a_flags[k][slot_q] && !crashed[k]) begin
        first_a = KW'(k);
        live_a  = 1'b1;
      end
    end
    agree   = (na >= CW'(Q));
    skip    = !agree && (ne >= CW'(Q));
    prev_ok = (slot_q == '0) || exec_q[slot_q - SW'(1)];
  end

  logic [WW:0] data_idx;
  assign data_idx = {1'b0, w_q} - (WW+1)'(STR_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      exec_q      <= '0;
      port_q      <= '0;
      src_q       <= '0;
      rr_q        <= KW'(N - 1);
      slot_q      <= '0;
      w_q         <= '0;
      dest_q      <= '0;
      data_q      <= '0;
      size_q      <= '0;
      res_q       <= TC_NONE;
      last_res_q  <= '0;
      last_slot_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (pick_ok) begin
          port_q  <= pick;
          rr_q    <= pick;
          slot_q  <= b_wdata[pick][SW-1:0];
          state_q <= S_CHECK;
        end
        S_CHECK: begin
          if (exec_q[slot_q] || !prev_ok || !(agree || skip) || (agree && !live_a)) begin
            res_q   <= TC_REFUSED;
            state_q <= S_DONE;
          end else if (skip) begin
            exec_q[slot_q] <= 1'b1;
            res_q          <= TC_SKIPPED;
            state_q        <= S_DONE;
          end else begin
            exec_q[slot_q] <= 1'b1;
            res_q          <= TC_COPIED;
            src_q          <= first_a;
            w_q            <= WW'(STR_DEST);
            state_q        <= S_RD;
          end
        end
        S_RD: state_q <= S_WAIT;
        S_WAIT: if (crashed[src_q]) begin
          // the source crashed: read the same word again from another copy
          if (live_a) begin
            src_q   <= first_a;
            state_q <= S_RD;
          end else begin
            res_q   <= TC_REFUSED;
            state_q <= S_DONE;
          end
        end else if (rd_rvalid[src_q]) begin
          if (w_q == WW'(STR_DEST)) begin
            dest_q  <= rd_rdata[src_q];
            w_q     <= WW'(STR_SIZE);
            state_q <= S_RD;
          end else if (w_q == WW'(STR_SIZE)) begin
            size_q  <= (rd_rdata[src_q] > DATA_W'(MAX_DATA)) ? (WW+1)'(MAX_DATA)
                                                              : rd_rdata[src_q][WW:0];
            w_q     <= WW'(STR_DATA);
            state_q <= (rd_rdata[src_q] == '0) ? S_DONE : S_RD;
          end else begin
            data_q  <= rd_rdata[src_q];
            state_q <= S_WR;
          end
        end
        S_WR: if (dst_ready) begin
          if (data_idx + (WW+1)'(1) >= size_q) state_q <= S_DONE;
          else begin
            w_q     <= w_q + WW'(1);
            state_q <= S_RD;
          end
        end
        S_DONE: begin
          last_res_q[port_q]  <= res_q;
          last_slot_q[port_q] <= slot_q;
          state_q             <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
      if (dev_reset) exec_q <= '0;
    end
  end

  // string reads
  always_comb begin
    rd_req = '0;
    if (state_q == S_RD) rd_req[src_q] = 1'b1;
  end
  assign rd_addr = {slot_q, w_q};

  assign dst_valid = (state_q == S_WR);
  assign dst_addr  = dest_q + (DATA_W'(data_idx) << 2);
  assign dst_data  = data_q;

  // bus grants: reads at once, a command when it is finished
  always_comb begin
    for (int k = 0; k < N; k++)
      b_gnt[k] = b_req[k] && (!b_we[k] || (state_q == S_DONE && port_q == KW'(k)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_rvalid <= '0;
      b_err    <= '0;
      b_rdata  <= '0;
    end else begin
      for (int k = 0; k < N; k++) begin
        b_rvalid[k] <= b_gnt[k];
        b_err[k]    <= b_gnt[k] && b_we[k] && (res_q == TC_REFUSED);
        b_rdata[k]  <= '0;
        b_rdata[k][31]   <= exec_q[b_addr[k][2 +: SW]];
        b_rdata[k][15:8] <= 8'(last_slot_q[k]);
        b_rdata[k][1:0]  <= last_res_q[k];
      end
    end
  end

  // Only one copy is in flight: the destination sees a write only while copying.
  a_dst_only_copy: assert property (@(posedge clk) disable iff (!rst_n)
    dst_valid |-> res_q == TC_COPIED);

endmodule
