// ext_scheduler: instruction queue and out-of-order issue of the controller.
//
// Decoded instructions enter a queue of QDEPTH entries (32 in the document) in
// program order. Each cycle at most one entry is issued to the FSM of its
// class (MEM, ELM, MUL, NTT): the oldest entry that
//   - is the oldest queued entry of its class (each class runs in order),
//   - whose class FSM is idle,
//   - whose PE mask overlaps neither an older queued entry nor the PE mask of
//     any FSM still running, and
//   - (MEM and NTT only) does not need the write-back line while the other
//     of these two classes is running.
// So work on disjoint PEs overlaps freely, e.g. a load into one PE while
// another PE computes. Illegal instructions are dropped and counted.
// The issue rules are this design's; the document states only out-of-order
// issue from a 32-deep queue.
// Timing: an accepted instruction can issue the next cycle; an FSM raises busy
// the cycle after its start pulse.
module ext_scheduler
  import presto_pkg::*;
#(
  parameter int unsigned QDEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  he_dec_t      in_dec,
  output logic [3:0]   iss_valid,     // one-hot by class
  output he_dec_t      iss_dec,
  input  logic [3:0]   fsm_busy,
  input  pemask_t      fsm_mask [4],
  output logic         empty,
  output logic [15:0]  illegal_cnt
);
  localparam int unsigned CW = $clog2(QDEPTH+1);
  he_dec_t     q [QDEPTH];
  logic [CW-1:0] cnt;
  logic        found;
  logic [$clog2(QDEPTH)-1:0] sel;
  logic        push, pop;

  assign in_ready = (cnt < CW'(QDEPTH));
  assign empty    = (cnt == 0);
  assign push     = in_valid && in_ready && (in_dec.op != HE_ILLEGAL);

  always_comb begin
    pemask_t older, busy_mask;
    logic [3:0] cls_seen;
    logic ok;
    ok = 1'b0;
    found = 1'b0; sel = '0; older = '0; cls_seen = '0;
    busy_mask = '0;
    for (int c = 0; c < 4; c++) if (fsm_busy[c]) busy_mask |= fsm_mask[c];
    for (int i = 0; i < QDEPTH; i++) begin
      if (i < int'(cnt) && !found) begin
        ok = !cls_seen[q[i].cls] && !fsm_busy[q[i].cls]
             && ((q[i].mask & older) == '0) && ((q[i].mask & busy_mask) == '0);
        if (q[i].cls == CL_MEM && fsm_busy[CL_NTT]) ok = 1'b0;
        if (q[i].cls == CL_NTT && fsm_busy[CL_MEM]) ok = 1'b0;
        if (ok) begin found = 1'b1; sel = ($clog2(QDEPTH))'(i); end
        cls_seen[q[i].cls] = 1'b1;
        older |= q[i].mask;
      end
    end
  end

  assign pop       = found;
  assign iss_dec   = q[sel];
  assign iss_valid = found ? (4'b0001 << q[sel].cls) : 4'b0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; illegal_cnt <= '0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      if (in_valid && in_ready && in_dec.op == HE_ILLEGAL) illegal_cnt <= illegal_cnt + 1'b1;
      // remove the issued entry by shifting the younger ones down, then append
      for (int i = 0; i < QDEPTH; i++) begin
        if (pop && i >= int'(sel) && i < QDEPTH-1) q[i] <= q[i+1];
      end
      if (push) q[int'(cnt) - (pop ? 1 : 0)] <= in_dec;
      cnt <= cnt + CW'(push) - CW'(pop);
    end
  end

  // Issued work never overlaps running work and its FSM is idle.
  pemask_t run_mask;
  always_comb begin
    run_mask = '0;
    for (int c = 0; c < 4; c++) if (fsm_busy[c]) run_mask |= fsm_mask[c];
  end
  a_disjoint: assert property (@(posedge clk) disable iff (!rst_n)
    found |-> (((q[sel].mask & run_mask) == '0) && !fsm_busy[q[sel].cls]));
endmodule
