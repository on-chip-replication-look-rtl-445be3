// wo_mem_tile: one replica's write-once ("wo") tagged memory: the tag logic
// (wo_tag_mem), the string block RAM (wo_string_ram) and two AXI4-Lite slave
// ports.
//
// The owner port is the only path that can write (restricted read/write,
// "rw*"): string writes reach the RAM only if the tag logic allows them (the
// two enables are ANDed) and flag writes go through the set-only tri-state
// rule. A refused write answers SLVERR so the replica learns that it failed
// (for instance after a reset, when RF is set). The peer port carries only the
// read channels (AR/R): the other replicas can read every string and bitfield
// but have no write path at all; AW/W on it are ignored. A third, word-wide
// read port (tcr_*) lets the trusted copy unit read strings; it has priority
// over the peer port on RAM port B and always gets the RAM at once.
// Address map: byte address bit FLAG_BIT selects the bitfield region (word s =
// slot s); below it, slot s word w of the strings is at (s*STR_WORDS+w)*4.
// Higher address bits are ignored (aliases).
// Crash: the tile fails only by crashing, and detectably. It crashes when a
// string read (owner, peer or trusted copy) finds an error the RAM's code
// cannot correct, or when the crash input is raised (deliberate crash of the
// memory of a replica found faulty; the agreement to do so is outside this
// tile). A crashed tile refuses every write and answers every access with
// SLVERR and zero data until power-on reset; the crashed output tells the
// trusted copy unit not to use it as a source. Its flags stay frozen at their
// last values and still count for the seal and for the trusted copy's
// agreement check.
// Owner and peer ports, the AND-ed write enable and crashing on an
// uncorrectable error follow the proof-of-concept's design; the address map,
// SLVERR on refusal and on crash, and the port-B arbitration are this design's
// choices.
// Timing: after reset the tile first clears its RAM (SLOTS*STR_WORDS cycles,
// accesses wait). Then the device answers one cycle after it grants; with the
// axil_slave front end a write or read completes in 4 cycles on an idle port.
module wo_mem_tile
  import ibft_pkg::*;
#(
  parameter int unsigned N         = 3,
  parameter int unsigned SLOTS     = 64,
  parameter int unsigned STR_WORDS = 16,
  localparam int unsigned SW       = $clog2(SLOTS),
  localparam int unsigned DEPTH    = SLOTS * STR_WORDS,
  localparam int unsigned RW       = $clog2(DEPTH),
  localparam int unsigned WW       = $clog2(STR_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dev_reset,
  input  logic [SLOTS-1:0] seal,
  input  logic             crash,
  output logic             crashed,
  input  axil_req_t        own_req,
  output axil_rsp_t        own_rsp,
  input  axil_req_t        peer_req,
  output axil_rsp_t        peer_rsp,
  // trusted copy read port (RAM word index)
  input  logic             tcr_req,
  input  logic [RW-1:0]    tcr_addr,
  output logic             tcr_rvalid,
  output logic [DATA_W-1:0] tcr_rdata,
  // flag summary
  output logic [SLOTS-1:0] a_flags,
  output logic [SLOTS-1:0] ae_flags,
  output logic             rf_any
);

  // ---------------- owner port ----------------
  logic              o_req, o_we, o_gnt, o_rvalid, o_err;
  logic [ADDR_W-1:0] o_addr;
  logic [DATA_W-1:0] o_wdata, o_rdata;
  logic [3:0]        o_wstrb;

  axil_slave u_own (
    .clk, .rst_n, .s_req(own_req), .s_rsp(own_rsp),
    .b_req(o_req), .b_we(o_we), .b_addr(o_addr), .b_wdata(o_wdata), .b_wstrb(o_wstrb),
    .b_gnt(o_gnt), .b_rvalid(o_rvalid), .b_rdata(o_rdata), .b_err(o_err)
  );

  // ---------------- peer port (read channels only) ----------------
  axil_req_t         peer_ro;
  logic              p_req, p_we, p_gnt, p_rvalid;
  logic [ADDR_W-1:0] p_addr;
  logic [DATA_W-1:0] p_wdata, p_rdata;
  logic [3:0]        p_wstrb;

  always_comb begin
    peer_ro          = peer_req;
    peer_ro.aw_valid = 1'b0;
    peer_ro.w_valid  = 1'b0;
  end

  axil_slave u_peer (
    .clk, .rst_n, .s_req(peer_ro), .s_rsp(peer_rsp),
    .b_req(p_req), .b_we(p_we), .b_addr(p_addr), .b_wdata(p_wdata), .b_wstrb(p_wstrb),
    .b_gnt(p_gnt), .b_rvalid(p_rvalid), .b_rdata(p_rdata), .b_err(crashed)
  );

  // ---------------- address decode ----------------
  logic          o_is_flag, p_is_flag;
  logic [RW-1:0] o_widx, p_widx;
  logic [SW-1:0] o_fslot, p_fslot, o_sslot;
  assign o_is_flag = o_addr[FLAG_BIT];
  assign p_is_flag = p_addr[FLAG_BIT];
  assign o_widx    = o_addr[2 +: RW];
  assign p_widx    = p_addr[2 +: RW];
  assign o_fslot   = o_addr[2 +: SW];
  assign p_fslot   = p_addr[2 +: SW];
  assign o_sslot   = o_widx[WW +: SW];

  // ---------------- tag logic ----------------
  logic              fw_ok, sw_allow;
  logic [DATA_W-1:0] flag_a, flag_b;

  wo_tag_mem #(.N(N), .SLOTS(SLOTS)) u_tag (
    .clk, .rst_n, .dev_reset, .seal,
    .fw_en(o_gnt && o_we && o_is_flag && !crashed), .fw_slot(o_fslot), .fw_data(o_wdata),
    .fw_strb(o_wstrb), .fw_ok,
    .sw_slot(o_sslot), .sw_allow,
    .rd_slot_a(o_fslot), .rd_word_a(flag_a),
    .rd_slot_b(p_fslot), .rd_word_b(flag_b),
    .a_flags, .ae_flags, .rf_any
  );

  // ---------------- string RAM ----------------
  logic [DATA_W-1:0] ram_a_rdata, ram_b_rdata;
  logic              b_en, ram_ready, a_ue, b_ue;
  logic [RW-1:0]     b_addr;

  assign o_gnt = o_req && ram_ready;               // owner waits only for the clearing sweep
  assign p_gnt = p_req && ram_ready && !tcr_req;   // trusted copy first on port B
  assign b_en   = tcr_req || (p_gnt && !p_is_flag);
  assign b_addr = tcr_req ? tcr_addr : p_widx;

  wo_string_ram #(.DEPTH(DEPTH)) u_ram (
    .clk, .rst_n, .init_done(ram_ready),
    .a_en(o_gnt && !o_is_flag), .a_we(o_we), .a_allow(sw_allow && !crashed), .a_addr(o_widx),
    .a_wdata(o_wdata), .a_wstrb(o_wstrb), .a_rdata(ram_a_rdata), .a_ue,
    .b_en, .b_addr, .b_rdata(ram_b_rdata), .b_ue
  );

  // ---------------- responses (one cycle after grant) ----------------
  logic              o_flag_q, p_flag_q;
  logic [DATA_W-1:0] o_fword_q, p_fword_q;
  logic              o_err_q, o_we_q, tcr_q, crash_q, ue_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_rvalid  <= 1'b0;
      p_rvalid  <= 1'b0;
      tcr_q     <= 1'b0;
      o_flag_q  <= 1'b0;
      p_flag_q  <= 1'b0;
      o_fword_q <= '0;
      p_fword_q <= '0;
      o_err_q   <= 1'b0;
      o_we_q    <= 1'b0;
      crash_q   <= 1'b0;
    end else begin
      o_rvalid  <= o_gnt;
      p_rvalid  <= p_gnt;
      tcr_q     <= tcr_req;
      o_flag_q  <= o_is_flag;
      p_flag_q  <= p_is_flag;
      o_fword_q <= flag_a;
      p_fword_q <= flag_b;
      o_err_q   <= o_gnt && o_we && (crashed || (o_is_flag ? !fw_ok : !sw_allow));
      o_we_q    <= o_we;
      if (crash || ue_now) crash_q <= 1'b1;
    end
  end

  // an uncorrectable error in string data being returned right now
  assign ue_now  = (o_rvalid && !o_flag_q && !o_we_q && a_ue) ||
                   (p_rvalid && !p_flag_q && b_ue) || (tcr_q && b_ue);
  assign crashed = crash_q || ue_now;

  assign o_rdata    = crashed ? '0 : (o_flag_q ? o_fword_q : ram_a_rdata);
  assign o_err      = o_err_q || crashed;
  assign p_rdata    = crashed ? '0 : (p_flag_q ? p_fword_q : ram_b_rdata);
  assign tcr_rvalid = tcr_q;
  assign tcr_rdata  = crashed ? '0 : ram_b_rdata;

  // STR_WORDS must be a power of two for the slot/word split of the address.
  initial assert ((1 << WW) == STR_WORDS) else $error("STR_WORDS must be a power of two");

endmodule
