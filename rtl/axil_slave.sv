// axil_slave: AXI4-Lite slave front end of the write-once memory and of the
// reset and trusted copy devices.
//
// It accepts one transaction at a time. A write needs AW and W together (both
// are accepted in the same cycle); a read needs AR. Writes win when both are
// pending. The transaction becomes a request on the internal word bus, held
// until the device grants it; the device answers one cycle after the grant with
// read data and an error bit, which becomes SLVERR on B or R. The bus protocol
// (AXI4-Lite) follows the proof-of-concept; the one-outstanding design and the
// write priority are this implementation's choices.
//
// Timing: AW/W (or AR) accepted in cycle 0, request in cycle 1, response on B/R
// from cycle 3 when the device grants at once.
module axil_slave
  import ibft_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           s_req,
  output axil_rsp_t           s_rsp,
  // internal word bus
  output logic                b_req,
  output logic                b_we,
  output logic [ADDR_W-1:0]   b_addr,
  output logic [DATA_W-1:0]   b_wdata,
  output logic [3:0]          b_wstrb,
  input  logic                b_gnt,
  input  logic                b_rvalid,
  input  logic [DATA_W-1:0]   b_rdata,
  input  logic                b_err
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_RESP} state_e;
  state_e state_q;

  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] wdata_q, rdata_q;
  logic [3:0]        wstrb_q;
  logic              err_q;

  logic take_w, take_r;
  assign take_w = (state_q == S_IDLE) && s_req.aw_valid && s_req.w_valid;
  assign take_r = (state_q == S_IDLE) && !take_w && s_req.ar_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      wstrb_q <= '0;
      rdata_q <= '0;
      err_q   <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (take_w) begin
            we_q    <= 1'b1;
            addr_q  <= s_req.aw_addr;
            wdata_q <= s_req.w_data;
            wstrb_q <= s_req.w_strb;
            state_q <= S_REQ;
          end else if (take_r) begin
            we_q    <= 1'b0;
            addr_q  <= s_req.ar_addr;
            wstrb_q <= '0;
            state_q <= S_REQ;
          end
        end
        S_REQ:  if (b_gnt) state_q <= S_WAIT;
        S_WAIT: if (b_rvalid) begin
          rdata_q <= b_rdata;
          err_q   <= b_err;
          state_q <= S_RESP;
        end
        S_RESP: begin
          if (we_q ? s_req.b_ready : s_req.r_ready) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign b_req   = (state_q == S_REQ);
  assign b_we    = we_q;
  assign b_addr  = addr_q;
  assign b_wdata = wdata_q;
  assign b_wstrb = wstrb_q;

  always_comb begin
    s_rsp          = '0;
    s_rsp.aw_ready = take_w;
    s_rsp.w_ready  = take_w;
    s_rsp.ar_ready = take_r;
    s_rsp.b_valid  = (state_q == S_RESP) && we_q;
    s_rsp.b_resp   = err_q ? RESP_SLVERR : RESP_OKAY;
    s_rsp.r_valid  = (state_q == S_RESP) && !we_q;
    s_rsp.r_data   = rdata_q;
    s_rsp.r_resp   = err_q ? RESP_SLVERR : RESP_OKAY;
  end

  // The response must keep still while it waits for the master.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.b_valid && !s_req.b_ready |=> s_rsp.b_valid && $stable(s_rsp.b_resp));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.r_valid && !s_req.r_ready |=> s_rsp.r_valid && $stable(s_rsp.r_data));

endmodule
