// hypercore_sched_top: hardware task dispatcher of a shared-memory many-core
// processor, with replica-level scheduling directives and thread re-order
// buffers.
//
// Blocks and connections (following the system diagram of the document:
// cores, dispatch network, scheduler and a set of thread ROBs that give the
// scheduler es per task):
//   task_scheduler    task slots, directive evaluation, burst issue
//   dispatch_network  tree from the scheduler to the N_CORES cores: N_PORTS
//                     root ports, each a binary subtree
//   thread_rob x N_ROB  min-trees over the cores' (task, replica) pairs
//   core status       per core: busy, task slot and replica index of the
//                     replica it runs; loaded by a dispatch, cleared by the
//                     core's completion pulse.  These registers are the
//                     leaves of the thread ROBs.
//   start addresses   per slot, loaded with the slot (cfg_addr) and shown
//                     to a core with each dispatch (core_disp_addr).
// The cores themselves are outside: they receive core_disp_* (a one-cycle
// pulse naming task slot, replica and the task's start address) and answer with a one-cycle
// core_done pulse when the replica has finished.  A core must not report
// completion in the cycle its dispatch arrives.
//
// Timing: a burst issued in cycle t reaches the cores in cycle
// t + log2(N_CORES/N_PORTS) + 1; up to N_PORTS bursts leave per cycle.  A
// completion in cycle t frees the core for the tree from cycle t+1 and
// shows in the slot's c count from t+1; es follows
// ROB_STAGES cycles after the ROB samples the core states, and a
// time-multiplexed ROB (N_ROB < N_SLOTS) revisits a slot every
// N_SLOTS/N_ROB cycles.
//
// N_CORES and ROB_STAGES are the document's numbers, and the scheduler
// receiving each task's start address is the document's; the slot count, the
// constraint entries per slot, the ROB count, the root fan-out N_PORTS and
// the 32-bit address width are this design's choices.
module hypercore_sched_top
  import sched_pkg::*;
#(
  parameter int unsigned N_CORES    = 64,
  parameter int unsigned N_SLOTS    = 4,
  parameter int unsigned N_CONS     = 2,
  parameter int unsigned N_ROB      = 4,
  parameter int unsigned N_PORTS    = 4,
  parameter int unsigned ROB_STAGES = 3,
  parameter int unsigned PRIO_W     = 4,
  parameter int unsigned SLOT_W     = (N_SLOTS > 1) ? $clog2(N_SLOTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host configuration: unload all slots, load a task slot
  input  logic               cfg_clear,
  input  logic               cfg_we,
  input  logic [SLOT_W-1:0]  cfg_slot,
  input  rep_t               cfg_n,
  input  logic [PRIO_W-1:0]  cfg_prio,
  input  logic [N_SLOTS-1:0] cfg_prec,
  input  constraint_t        cfg_cons [N_CONS],
  input  addr_t              cfg_addr,
  // cores
  output logic               core_disp_valid [N_CORES],
  output logic [SLOT_W-1:0]  core_disp_task  [N_CORES],
  output rep_t               core_disp_rep   [N_CORES],
  output addr_t              core_disp_addr  [N_CORES],
  input  logic               core_done       [N_CORES],
  // status
  output task_state_t        slot_state    [N_SLOTS],
  output logic [N_SLOTS-1:0] slot_loaded,
  output logic [N_SLOTS-1:0] slot_done,
  output logic [N_SLOTS-1:0] slot_runnable,
  output logic [N_SLOTS-1:0] slot_blocked,
  output logic               issue_valid [N_PORTS],
  output logic [SLOT_W-1:0]  issue_task  [N_PORTS],
  output rep_t               issue_first [N_PORTS],
  output rep_t               issue_count [N_PORTS],
  output rep_t               free_cores  [N_PORTS]
);

  logic              arr_valid [N_PORTS];
  logic [SLOT_W-1:0] arr_task  [N_PORTS];
  rep_t              arr_count [N_PORTS];

  logic              core_busy [N_CORES];
  logic [SLOT_W-1:0] core_task [N_CORES];
  rep_t              core_rep  [N_CORES];

  logic              rob_sel_valid   [N_ROB];
  logic [SLOT_W-1:0] rob_sel_task    [N_ROB];
  logic              rob_sel_tag     [N_ROB];
  rep_t              rob_sel_arrived [N_ROB];
  logic              rob_out_valid   [N_ROB];
  logic [SLOT_W-1:0] rob_out_task    [N_ROB];
  logic              rob_out_tag     [N_ROB];
  rep_t              rob_out_es      [N_ROB];

  task_scheduler #(
    .N_CORES(N_CORES), .N_SLOTS(N_SLOTS), .N_CONS(N_CONS), .N_ROB(N_ROB),
    .N_PORTS(N_PORTS), .PRIO_W(PRIO_W), .SLOT_W(SLOT_W)
  ) u_sched (
    .clk, .rst_n,
    .cfg_clear, .cfg_we, .cfg_slot, .cfg_n, .cfg_prio, .cfg_prec, .cfg_cons,
    .free_cores,
    .issue_valid, .issue_task, .issue_first, .issue_count,
    .arr_valid, .arr_task, .arr_count,
    .core_done, .core_task,
    .rob_sel_valid, .rob_sel_task, .rob_sel_tag, .rob_sel_arrived,
    .rob_out_valid, .rob_out_task, .rob_out_tag, .rob_out_es,
    .slot_state, .slot_loaded, .slot_done, .slot_runnable, .slot_blocked
  );

  dispatch_network #(.N_CORES(N_CORES), .N_PORTS(N_PORTS), .SLOT_W(SLOT_W)) u_net (
    .clk, .rst_n,
    .issue_valid, .issue_task, .issue_first, .issue_count,
    .free_cores,
    .core_disp_valid, .core_disp_task, .core_disp_rep,
    .core_done,
    .arr_valid, .arr_task, .arr_count
  );

  // Start address of each slot's task, loaded with the slot.  A slot is
  // reloaded only when none of its replicas is in flight, so a core reads
  // the address of the task its replica belongs to.
  addr_t start_addr [N_SLOTS];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      for (int x = 0; x < N_SLOTS; x++) start_addr[x] <= '0;
    else if (cfg_we)
      start_addr[cfg_slot] <= cfg_addr;

  always_comb
    for (int j = 0; j < N_CORES; j++) core_disp_addr[j] = start_addr[core_disp_task[j]];

  // Core status registers: what each core is executing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_CORES; j++) begin
        core_busy[j] <= 1'b0;
        core_task[j] <= '0;
        core_rep[j]  <= '0;
      end
    end else begin
      for (int j = 0; j < N_CORES; j++) begin
        if (core_disp_valid[j]) begin
          core_busy[j] <= 1'b1;
          core_task[j] <= core_disp_task[j];
          core_rep[j]  <= core_disp_rep[j];
        end else if (core_done[j]) begin
          core_busy[j] <= 1'b0;
        end
      end
    end
  end

  for (genvar r = 0; r < N_ROB; r++) begin : g_rob
    thread_rob #(
      .N_CORES(N_CORES), .SLOT_W(SLOT_W), .TAG_W(1), .STAGES(ROB_STAGES)
    ) u_rob (
      .clk, .rst_n,
      .core_busy, .core_task, .core_rep,
      .sel_valid   (rob_sel_valid[r]),
      .sel_task    (rob_sel_task[r]),
      .sel_tag     (rob_sel_tag[r]),
      .sel_arrived (rob_sel_arrived[r]),
      .out_valid   (rob_out_valid[r]),
      .out_task    (rob_out_task[r]),
      .out_tag     (rob_out_tag[r]),
      .out_es      (rob_out_es[r])
    );
  end

  // Completion only comes from a core that is running a replica.
  for (genvar j = 0; j < N_CORES; j++) begin : g_chk
    a_done_busy: assert property (@(posedge clk) disable iff (!rst_n)
      core_done[j] |-> core_busy[j] && !core_disp_valid[j]);
  end

endmodule
