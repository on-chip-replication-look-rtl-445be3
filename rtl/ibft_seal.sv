// ibft_seal: the "majority timed out" detector shared by all write-once
// memories. For every slot it counts in how many memories the A flag is set
// and in how many the AE flag is set; once either count reaches f+1 the slot is
// sealed, and every memory then refuses further flag writes to it, so no
// replica can change its vote after the majority has decided.
// The rule follows the protocol's error handling; that it is a separate,
// purely combinational block fed by all memories is this design's choice.
// Interface: a_flags[k][s] / ae_flags[k][s] from memory k, seal[s] to all.
// Timing: combinational; a slot is sealed in the cycle after the flag write
// that completes the quorum.
module ibft_seal
  import ibft_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned SLOTS = 64
) (
  input  logic [N-1:0][SLOTS-1:0] a_flags,
  input  logic [N-1:0][SLOTS-1:0] ae_flags,
  output logic [SLOTS-1:0]        seal
);

  localparam int unsigned Q  = quorum(N);
  localparam int unsigned CW = $clog2(N + 1);

  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      logic [CW-1:0] na, ne;
      na = '0;
      ne = '0;
      for (int k = 0; k < N; k++) begin
        na = na + CW'(a_flags[k][s]);
        ne = ne + CW'(ae_flags[k][s]);
      end
      seal[s] = (na >= CW'(Q)) || (ne >= CW'(Q));
    end
  end

endmodule
