// ctrl_xbar: control fetching crossbar between the FSMs and the PEs.
//
// Every cycle each PE fetches the 57-bit control word of the FSM whose
// per-cycle PE mask contains it, or a no-operation word if none does. The
// scheduler keeps the FSMs on disjoint PEs, which an assertion checks; where
// masks did overlap, the lower-numbered FSM would win. Combinational.
module ctrl_xbar
  import presto_pkg::*;
#(
  parameter int unsigned N_PE  = 32,
  parameter int unsigned NFSM  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ctrl_t                fsm_ctrl [NFSM],
  input  logic [N_PE-1:0]      fsm_mask [NFSM],
  output ctrl_t                pe_ctrl  [N_PE]
);
  logic [NFSM-1:0] owners [N_PE];

  always_comb begin
    for (int p = 0; p < N_PE; p++) begin
      pe_ctrl[p] = CTRL_NOP;
      for (int f = NFSM-1; f >= 0; f--) begin
        owners[p][f] = fsm_mask[f][p];
        if (fsm_mask[f][p]) pe_ctrl[p] = fsm_ctrl[f];
      end
    end
  end

  for (genvar p = 0; p < N_PE; p++) begin : g_chk
    a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(owners[p]));
  end
endmodule
