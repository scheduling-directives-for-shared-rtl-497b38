// sched_harness: stimulus, core model and checking for the scheduler system
// testbenches.  It is connected port by port to a hypercore_sched_top
// instance created by the testbench module.
//
// It runs four workloads, each loading all four task slots and running
// until every slot has completed:
//   1. SAC(B,A,l=1), LNAR(K=5) and a regular task with task-level precedence
//   2. SAS(B,A,lmin=2,lmax=8), LNR(K=4) and SAMC(D,C,M=3)
//   3. ACF between two tasks, plus two regular tasks of different priority
//   4. perfect lockstep: SAS(B,A,lmin=0,lmax=1) with equal task priorities,
//      behind a regular task and followed by a regular join task; the issue
//      order of A and B must alternate A, B, A, B, ... one replica at a time
// The core model runs each replica for a random 1..MAX_RUN cycles, so
// replicas complete out of order.  Every issued burst is checked by
// tb_sched_check_pkg, the priority rule is checked each cycle, es is checked
// never to exceed the true lowest started-but-uncompleted replica and to
// reach n at the end, and each mechanism (burst split, core-limited burst,
// several tasks started in one cycle, one task spread over several ports,
// each directive holding a task, precedence wait, priority arbitration, es
// advancing by more than one) is counted; one that never happened counts as
// a failure.
module sched_harness
  import sched_pkg::*;
  import tb_sched_check_pkg::*;
#(
  parameter int N_CORES = 64,
  parameter int N_SLOTS = 4,
  parameter int N_CONS  = 2,
  parameter int PRIO_W  = 4,
  parameter int SLOT_W  = 2,
  parameter int MAX_RUN = 30,
  parameter int N_PORTS = 4,
  parameter int SCALE   = 1     // multiplies the replica counts
) (
  output logic               clk,
  output logic               rst_n,
  output logic               cfg_clear,
  output logic               cfg_we,
  output logic [SLOT_W-1:0]  cfg_slot,
  output rep_t               cfg_n,
  output logic [PRIO_W-1:0]  cfg_prio,
  output logic [N_SLOTS-1:0] cfg_prec,
  output constraint_t        cfg_cons [N_CONS],
  output addr_t              cfg_addr,
  input  logic               core_disp_valid [N_CORES],
  input  logic [SLOT_W-1:0]  core_disp_task  [N_CORES],
  input  rep_t               core_disp_rep   [N_CORES],
  input  addr_t              core_disp_addr  [N_CORES],
  output logic               core_done       [N_CORES],
  input  task_state_t        slot_state    [N_SLOTS],
  input  logic [N_SLOTS-1:0] slot_loaded,
  input  logic [N_SLOTS-1:0] slot_done,
  input  logic [N_SLOTS-1:0] slot_runnable,
  input  logic [N_SLOTS-1:0] slot_blocked,
  input  logic               issue_valid [N_PORTS],
  input  logic [SLOT_W-1:0]  issue_task  [N_PORTS],
  input  rep_t               issue_first [N_PORTS],
  input  rep_t               issue_count [N_PORTS],
  input  rep_t               free_cores  [N_PORTS],
  output int                 checks,
  output int                 failures,
  output logic               finished
);

  sched_checker #(N_SLOTS, N_CONS) chk;

  int          run_left  [N_CORES];
  logic [SLOT_W-1:0] run_task [N_CORES];
  rep_t        run_rep   [N_CORES];
  logic [PRIO_W-1:0] prio_of [N_SLOTS];
  addr_t             addr_of [N_SLOTS];
  int          own_checks = 0, own_failures = 0;
  int          cyc = 0;
  dir_kind_e   kind_of [N_SLOTS];

  // mechanism counters
  int n_split = 0, n_core_limited = 0, n_prec_wait = 0, n_arbitration = 0, n_es_jump = 0;
  int n_multi_task = 0, n_multi_port = 0;
  logic lock_on = 0;          // workload 4: slots 0 and 1 must alternate
  int   lock_last = 1, lock_issues = 0;
  int n_held [8];
  rep_t es_prev [N_SLOTS];

  initial clk = 0;
  always #5 clk = ~clk;

  assign checks   = own_checks + ((chk == null) ? 0 : chk.checks);
  assign failures = own_failures + ((chk == null) ? 0 : chk.failures);

  task automatic fail(string msg);
    own_failures++;
    if (own_failures < 15) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  task automatic load(int x, int n, int prio, logic [N_SLOTS-1:0] prec,
                      dir_kind_e k0, int p0, int a0, dir_kind_e k1, int p1, int a1);
    constraint_t cc [N_CONS];
    for (int k = 0; k < N_CONS; k++) cc[k] = '{kind: DIR_NONE, partner: 8'd0, arg: '0};
    cc[0] = '{kind: k0, partner: 8'(p0), arg: cnt_t'(a0)};
    if (N_CONS > 1) cc[1] = '{kind: k1, partner: 8'(p1), arg: cnt_t'(a1)};
    step();
    cfg_we = 1; cfg_slot = SLOT_W'(x); cfg_n = rep_t'(n); cfg_prio = PRIO_W'(prio);
    cfg_prec = prec; cfg_cons = cc;
    addr_of[x] = addr_t'($urandom);
    cfg_addr = addr_of[x];
    chk.configure(x, n, cc, prec);
    prio_of[x] = PRIO_W'(prio);
    kind_of[x] = k0;
    es_prev[x] = '0;
  endtask

  // One cycle of checking and core modelling, at the negative edge.
  task automatic step();
    @(negedge clk);
    cfg_we = 0;
    cfg_clear = 0;
    cyc++;
    // bursts about to be issued, merged per slot (a slot's ports carry
    // consecutive indices in port order)
    begin
      int free_total, n_tasks, top, first_of [N_SLOTS], cnt_of [N_SLOTS], ports_of [N_SLOTS];
      free_total = 0;
      n_tasks = 0;
      for (int p = 0; p < N_PORTS; p++) free_total += int'(free_cores[p]);
      for (int y = 0; y < N_SLOTS; y++) begin first_of[y] = -1; cnt_of[y] = 0; ports_of[y] = 0; end
      for (int p = 0; p < N_PORTS; p++)
        if (issue_valid[p]) begin
          int x;
          x = int'(issue_task[p]);
          own_checks++;
          if (issue_count[p] == 0 || issue_count[p] > free_cores[p])
            fail($sformatf("port %0d burst of %0d, %0d free", p, issue_count[p], free_cores[p]));
          if (first_of[x] < 0) begin
            first_of[x] = int'(issue_first[p]);
            n_tasks++;
          end else if (int'(issue_first[p]) != first_of[x] + cnt_of[x])
            fail($sformatf("slot %0d ports not consecutive", x));
          cnt_of[x] += int'(issue_count[p]);
          ports_of[x]++;
        end
      for (int x = 0; x < N_SLOTS; x++)
        if (cnt_of[x] > 0) begin
          chk.on_issue(x, first_of[x], cnt_of[x], free_total, $sformatf("cycle %0d", cyc));
          if (cnt_of[x] > 1) n_split++;
          if (ports_of[x] > 1) n_multi_port++;
        end
      if (n_tasks > 1) n_multi_task++;
      if (lock_on)
        for (int x = 0; x < 2; x++)
          if (cnt_of[x] > 0) begin
            own_checks++;
            if (cnt_of[x] != 1 || x == lock_last || cnt_of[1 - x] != 0)
              fail($sformatf("lockstep: slot %0d issued %0d after slot %0d", x, cnt_of[x], lock_last));
            lock_last = x;
            lock_issues++;
          end
      begin
        int issued_total;
        issued_total = 0;
        for (int x = 0; x < N_SLOTS; x++) issued_total += cnt_of[x];
        if (issued_total != 0 && issued_total == free_total) begin
          for (int x = 0; x < N_SLOTS; x++)
            if (cnt_of[x] > 0 && cnt_of[x] < int'(slot_state[x].n - slot_state[x].s)) n_core_limited++;
        end
      end
      // priority: the best eligible slot is always among those issued
      top = -1;
      begin
        int eligible;
        eligible = 0;
        for (int y = 0; y < N_SLOTS; y++)
          if (slot_runnable[y] && !slot_blocked[y]) begin
            eligible++;
            if (top < 0 || prio_of[y] > prio_of[top]) top = y;
          end
        if (eligible > 1) n_arbitration++;
      end
      if (top >= 0 && free_total != 0) begin
        own_checks++;
        if (cnt_of[top] == 0)
          fail($sformatf("slot %0d has the highest priority but was not issued", top));
      end
    end
    // directive and precedence holds
    for (int y = 0; y < N_SLOTS; y++) begin
      if (slot_blocked[y] && free_cores.sum() with (int'(item)) != 0) n_held[int'(kind_of[y])]++;
      if (slot_loaded[y] && !slot_runnable[y] && slot_state[y].s < slot_state[y].n)
        n_prec_wait++;
      // es is a safe lower bound of the true value
      if (slot_loaded[y]) begin
        own_checks++;
        if (int'(slot_state[y].es) > chk.es_ref(y))
          fail($sformatf("slot %0d es=%0d above true %0d", y, slot_state[y].es, chk.es_ref(y)));
        if (slot_state[y].es > es_prev[y] + 1) n_es_jump++;
        es_prev[y] = slot_state[y].es;
      end
    end
    // cores: new arrivals
    for (int j = 0; j < N_CORES; j++)
      if (core_disp_valid[j]) begin
        own_checks++;
        if (run_left[j] != 0) fail($sformatf("core %0d dispatched while busy", j));
        own_checks++;
        if (core_disp_addr[j] != addr_of[core_disp_task[j]])
          fail($sformatf("core %0d got start address %h, slot %0d has %h", j, core_disp_addr[j],
                         core_disp_task[j], addr_of[core_disp_task[j]]));
        run_left[j] = 1 + ($urandom % MAX_RUN);
        run_task[j] = core_disp_task[j];
        run_rep[j]  = core_disp_rep[j];
      end
    // cores: completions (not in the arrival cycle: run_left >= 1 there)
    for (int j = 0; j < N_CORES; j++) begin
      core_done[j] = 1'b0;
      if (run_left[j] > 0 && !core_disp_valid[j]) begin
        run_left[j]--;
        if (run_left[j] == 0) begin
          core_done[j] = 1'b1;
          chk.on_complete(int'(run_task[j]), int'(run_rep[j]), $sformatf("cycle %0d", cyc));
        end
      end
    end
  endtask

  task automatic run_until_done(string name);
    int guard;
    guard = 0;
    while (!(&slot_done) && guard < 200000) begin
      step();
      guard++;
    end
    repeat (20) step();
    for (int y = 0; y < N_SLOTS; y++) begin
      own_checks++;
      if (!slot_done[y] || slot_state[y].s != slot_state[y].n || slot_state[y].es != slot_state[y].n
          || chk.c[y] != chk.n[y])
        fail($sformatf("%s: slot %0d ended with s=%0d c=%0d es=%0d n=%0d", name, y,
                       slot_state[y].s, slot_state[y].c, slot_state[y].es, slot_state[y].n));
    end
    $display("%s finished at cycle %0d", name, cyc);
    step();
    cfg_clear = 1;
    for (int y = 0; y < N_SLOTS; y++) chk.loaded[y] = 0;
  endtask

  initial begin
    chk = new();
    finished = 0;
    rst_n = 0; cfg_clear = 0; cfg_we = 0; cfg_addr = '0; cfg_slot = 0; cfg_n = 0; cfg_prio = 0; cfg_prec = 0;
    for (int k = 0; k < N_CONS; k++) cfg_cons[k] = '0;
    for (int j = 0; j < N_CORES; j++) begin core_done[j] = 0; run_left[j] = 0; end
    for (int k = 0; k < 8; k++) n_held[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Workload 1: slot 1 (B) waits on A_(j+1); slot 2 limited to 5 active;
    // slot 3 is a regular task after B.  Higher slot priority for B and D.
    load(3, 1,             3, 4'b0010, DIR_NONE, 0, 0, DIR_NONE, 0, 0);
    load(1, 30 * SCALE,    2, 4'b0000, DIR_SAC,  0, 1, DIR_NONE, 0, 0);
    load(2, 20 * SCALE,    0, 4'b0000, DIR_LNAR, 2, 5, DIR_NONE, 0, 0);
    load(0, 40 * SCALE,    1, 4'b0000, DIR_NONE, 0, 0, DIR_NONE, 0, 0);
    run_until_done("workload 1 (SAC, LNAR, precedence)");

    // Workload 2: A and B paced by SAS(B,A,2,8); C limited to a window of 4
    // past es; D_j needs C_(3j) .. C_(3j+2).
    load(1, 60 * SCALE, 2, 4'b0000, DIR_SAS_LO, 0, 2, DIR_NONE, 0, 0);
    load(0, 60 * SCALE, 1, 4'b0000, DIR_SAS_HI, 1, 8, DIR_NONE, 0, 0);
    load(3, 10 * SCALE, 3, 4'b0000, DIR_SAMC,   2, 3, DIR_NONE, 0, 0);
    load(2, 30 * SCALE, 0, 4'b0000, DIR_LNR,    2, 4, DIR_NONE, 0, 0);
    run_until_done("workload 2 (SAS, LNR, SAMC)");

    // Workload 3: A and B share the cores fairly; two regular tasks,
    // the higher-priority one loaded last.
    load(0, 100 * SCALE, 1, 4'b0000, DIR_ACF,  1, 0, DIR_NONE, 0, 0);
    load(1, 100 * SCALE, 1, 4'b0000, DIR_ACF,  0, 0, DIR_NONE, 0, 0);
    load(2, 1,           5, 4'b0000, DIR_NONE, 0, 0, DIR_NONE, 0, 0);
    load(3, 1,           6, 4'b0000, DIR_NONE, 0, 0, DIR_NONE, 0, 0);
    run_until_done("workload 3 (ACF, priority)");

    // Workload 4: C (slot 2) first; then A (slot 0) and B (slot 1), equal
    // priority, in perfect lockstep; D (slot 3) joins A and B.
    lock_on = 1;
    load(3, 1,          0, 4'b0011, DIR_NONE,   0, 0, DIR_NONE, 0, 0);
    load(2, 1,          0, 4'b0000, DIR_NONE,   0, 0, DIR_NONE, 0, 0);
    load(1, 20 * SCALE, 1, 4'b0100, DIR_SAS_LO, 0, 0, DIR_NONE, 0, 0);
    load(0, 20 * SCALE, 1, 4'b0100, DIR_SAS_HI, 1, 1, DIR_NONE, 0, 0);
    run_until_done("workload 4 (perfect lockstep)");
    lock_on = 0;
    own_checks++;
    if (lock_issues != 2 * 20 * SCALE)
      fail($sformatf("lockstep: %0d single-replica issues, expected %0d", lock_issues, 2 * 20 * SCALE));

    $display("mechanisms: bursts>1=%0d core-limited=%0d arbitration=%0d precedence-wait=%0d es-jumps=%0d",
             n_split, n_core_limited, n_arbitration, n_prec_wait, n_es_jump);
    $display("            tasks sharing a cycle=%0d task over several ports=%0d", n_multi_task, n_multi_port);
    $display("held by: SAC=%0d SAS-lo=%0d SAS-hi=%0d LNAR=%0d ACF=%0d LNR=%0d SAMC=%0d",
             n_held[DIR_SAC], n_held[DIR_SAS_LO], n_held[DIR_SAS_HI], n_held[DIR_LNAR],
             n_held[DIR_ACF], n_held[DIR_LNR], n_held[DIR_SAMC]);
    own_checks++;
    if (n_split == 0 || n_core_limited == 0 || n_arbitration == 0 || n_prec_wait == 0 || n_es_jump == 0
        || (N_PORTS > 1 && (n_multi_task == 0 || n_multi_port == 0)))
      fail("a dispatch mechanism was never exercised");
    for (int k = 1; k < 8; k++) begin
      own_checks++;
      if (n_held[k] == 0) fail($sformatf("directive %s never held a task", dir_kind_e'(k)));
    end
    finished = 1;
  end
endmodule
