// dispatch_network: the tree that carries dispatches from the scheduler to
// the cores.
//
// The dispatcher at the root has N_PORTS children, each the root of a binary
// subtree over N_CORES/N_PORTS cores.  Every cycle the scheduler may hand
// each port a burst: one task slot, the index of the burst's first replica
// and a replica count.  Different ports may carry different tasks in the same
// cycle (one task per subtree), and one task may be spread over several
// ports (many replicas per subtree).  Every internal node holds a burst for
// one cycle and splits it between its two children: the lower-index replicas
// go to child 0, as many as that subtree has free cores, and the rest, with
// the following indices, to child 1.  A burst therefore reaches the leaves,
// the cores, with one replica per core and replica indices ascending from
// left to right, SUB_LEVELS+1 cycles after it was issued (one cycle per
// subtree level plus the subtree root's input register).  A burst of one
// replica is the dispatch of a regular task.
//
// Each node keeps, for each child, a credit counter: the number of free cores
// in that subtree that it has not yet promised.  A node subtracts what it
// sends down and adds the cores of the subtree that report completion
// (core_done).  The counters of the subtree roots are free_cores[p]; the
// scheduler must not issue more to port p than it shows, and an assertion
// checks this.
//
// The tree shape, one cycle per node, the two dispatch modes (one task per
// subtree, or a duplicable task with several replicas per subtree limited by
// the subtree's core count) and in-order submission follow the document.  The
// fan-out of N_PORTS at the root and 2 below it, the credit counters and the
// left-to-right index order are this design's choices (the document leaves
// the fan-out to the implementation and does not say how a node knows its
// subtree's free cores).
//
// Besides the per-core dispatch pulse, arr_*[p] reports in the same cycle
// which task slot received how many replicas through port p, so that a
// caller can count arrivals.
module dispatch_network
  import sched_pkg::*;
#(
  parameter int unsigned N_CORES = 64,   // a power of two, at least 2
  parameter int unsigned N_PORTS = 4,    // a power of two, below N_CORES
  parameter int unsigned SLOT_W  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // bursts from the scheduler, one per root port
  input  logic              issue_valid [N_PORTS],
  input  logic [SLOT_W-1:0] issue_task  [N_PORTS],
  input  rep_t              issue_first [N_PORTS],
  input  rep_t              issue_count [N_PORTS],
  output rep_t              free_cores  [N_PORTS],
  // per-core dispatch, a one-cycle pulse
  output logic              core_disp_valid [N_CORES],
  output logic [SLOT_W-1:0] core_disp_task  [N_CORES],
  output rep_t              core_disp_rep   [N_CORES],
  // per-core completion, a one-cycle pulse
  input  logic              core_done       [N_CORES],
  // summary of what reached the cores this cycle, per port
  output logic              arr_valid [N_PORTS],
  output logic [SLOT_W-1:0] arr_task  [N_PORTS],
  output rep_t              arr_count [N_PORTS]
);

  localparam int unsigned LEVELS     = $clog2(N_CORES);
  localparam int unsigned SUB_LEVELS = LEVELS - $clog2(N_PORTS);
  localparam int unsigned N_NODE     = 2 * N_CORES;   // heap index 1 .. 2N-1

  typedef struct packed {
    logic              valid;
    logic [SLOT_W-1:0] task_id;
    rep_t              first;
    rep_t              count;
  } burst_t;

  // Heap layout of a full binary tree: node i has children 2i and 2i+1,
  // nodes N_PORTS .. 2*N_PORTS-1 are the subtree roots fed by the ports,
  // nodes N_CORES .. 2*N_CORES-1 are the cores.  Nodes below N_PORTS stand
  // for the dispatcher itself and hold nothing.
  burst_t pkt      [N_NODE];   // burst held at each node (index 0 unused)
  burst_t pkt_nxt  [N_NODE];
  rep_t   credit   [N_NODE];   // free cores of subtree i, as its parent sees them
  rep_t   freed    [N_NODE];   // completions in subtree i this cycle
  burst_t arr_pipe [N_PORTS][SUB_LEVELS+1];

  // Size of the subtree below heap node i.
  function automatic rep_t subtree_size(int unsigned i);
    int unsigned lvl = 0;
    for (int unsigned l = 0; l <= LEVELS; l++)
      if (i >= (1 << l)) lvl = l;   // lvl = floor(log2(i))
    return rep_t'(N_CORES >> lvl);
  endfunction

  always_comb begin
    freed[0] = '0;
    for (int j = 0; j < N_CORES; j++)
      freed[N_CORES + j] = rep_t'(core_done[j]);
    for (int i = N_CORES - 1; i >= 1; i--)
      freed[i] = freed[2*i] + freed[2*i+1];
  end

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) pkt_nxt[i] = '0;
    for (int p = 0; p < N_PORTS; p++)
      pkt_nxt[N_PORTS + p] = '{valid: issue_valid[p], task_id: issue_task[p],
                               first: issue_first[p], count: issue_count[p]};
    for (int i = N_PORTS; i < N_CORES; i++) begin
      automatic rep_t c0 = (pkt[i].count < credit[2*i]) ? pkt[i].count : credit[2*i];
      automatic rep_t c1 = pkt[i].count - c0;
      pkt_nxt[2*i]   = '{valid: pkt[i].valid && c0 != '0, task_id: pkt[i].task_id,
                         first: pkt[i].first, count: c0};
      pkt_nxt[2*i+1] = '{valid: pkt[i].valid && c1 != '0, task_id: pkt[i].task_id,
                         first: pkt[i].first + c0, count: c1};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_NODE; i++) begin
        pkt[i]    <= '0;
        credit[i] <= (i < N_PORTS) ? '0 : subtree_size(i);
      end
      for (int p = 0; p < N_PORTS; p++)
        for (int l = 0; l <= SUB_LEVELS; l++) arr_pipe[p][l] <= '0;
    end else begin
      for (int i = N_PORTS; i < N_NODE; i++) begin
        pkt[i]    <= pkt_nxt[i];
        credit[i] <= credit[i] - (pkt_nxt[i].valid ? pkt_nxt[i].count : '0) + freed[i];
      end
      for (int p = 0; p < N_PORTS; p++) begin
        arr_pipe[p][0] <= pkt_nxt[N_PORTS + p];
        for (int l = 1; l <= SUB_LEVELS; l++) arr_pipe[p][l] <= arr_pipe[p][l-1];
      end
    end
  end

  always_comb
    for (int p = 0; p < N_PORTS; p++) begin
      free_cores[p] = credit[N_PORTS + p];
      arr_valid[p]  = arr_pipe[p][SUB_LEVELS].valid;
      arr_task[p]   = arr_pipe[p][SUB_LEVELS].task_id;
      arr_count[p]  = arr_pipe[p][SUB_LEVELS].count;
    end

  always_comb
    for (int j = 0; j < N_CORES; j++) begin
      core_disp_valid[j] = pkt[N_CORES + j].valid;
      core_disp_task[j]  = pkt[N_CORES + j].task_id;
      core_disp_rep[j]   = pkt[N_CORES + j].first;
    end

  // The scheduler may only issue what a subtree can place.
  for (genvar p = 0; p < N_PORTS; p++) begin : g_port_chk
    a_issue_fits: assert property (@(posedge clk) disable iff (!rst_n)
      issue_valid[p] |-> (issue_count[p] != '0 && issue_count[p] <= free_cores[p]));
  end
  // A core never receives a dispatch as a multi-replica burst.
  for (genvar j = 0; j < N_CORES; j++) begin : g_chk
    a_one_per_core: assert property (@(posedge clk) disable iff (!rst_n)
      pkt[N_CORES + j].valid |-> pkt[N_CORES + j].count == rep_t'(1));
  end

endmodule
