// task_scheduler: the synchronizer/scheduler extended with the replica-level
// scheduling directives.
//
// The scheduler holds N_SLOTS task slots.  A host unloads all slots with
// cfg_clear (only when no replica is running) and loads a slot through the
// cfg_* port with the task's replica count n (1 for a regular task), its
// priority, a precedence mask and N_CONS directive constraints.  The mask is
// the conventional task-level Start-After-Complete: the slot becomes runnable
// once every slot named in it has completed all its replicas.  For each slot
// the scheduler keeps the state the directives need:
//   s        replicas dispatched, advanced when a burst is issued
//   c        replicas completed, advanced by the cores' completion pulses
//   es       lowest started-but-uncompleted replica, from the thread ROBs
//   arrived  replicas that have reached a core (reported by the dispatch tree)
// Each cycle every slot's directive_eval turns that state into the number of
// replicas the slot may dispatch.  The dispatch tree has N_PORTS root ports,
// each with its own free-core count; the scheduler fills them in port order.
// The runnable slot with a non-zero number and the highest priority (lowest
// slot index on a tie) goes first and takes as many ports as its number
// needs, min(allowed, free) replicas on each, consecutive indices from s in
// port order.  A port it leaves unused goes to the next slot in priority
// order, one slot per port, so several tasks can start in the same cycle.
// Such a further slot must not be tied by a directive to a slot already
// chosen in that cycle, because its number was computed from the partner's
// state before this cycle's dispatches.  Replicas of a task thus leave in
// index order.

// Thread-ROB interface: the scheduler drives N_ROB time-multiplexed es trees.
// Tree r serves slots r, r+N_ROB, r+2*N_ROB, ... in turn; with N_ROB equal to
// N_SLOTS each tree is fixed to one slot (the replicated-tree arrangement),
// with N_ROB = 1 a single tree is shared.  With every request goes the
// slot's arrived count, sampled in the same cycle as the core states, and a
// generation tag; a result whose tag no longer matches (the slot was
// reloaded meanwhile) is dropped.  es only grows, so a result that is a few
// cycles old is a safe lower bound.
//
// The document gives the state variables, the directive formulas, the
// priority rule, in-order replica dispatch and the two dispatch modes; it
// leaves the scheduling logic to the implementer.  The port-filling order,
// the exclusion of tied slots from the same cycle, the slot table,
// the configuration port and the tie-break are this design's choices, as is
// holding a task whose constraint names a slot that is not loaded.
module task_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned N_CORES = 64,
  parameter int unsigned N_SLOTS = 4,
  parameter int unsigned N_CONS  = 2,
  parameter int unsigned N_ROB   = 4,
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned PRIO_W  = 4,
  parameter int unsigned SLOT_W  = (N_SLOTS > 1) ? $clog2(N_SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration: unload every slot, or load one (its state restarts)
  input  logic              cfg_clear,
  input  logic              cfg_we,
  input  logic [SLOT_W-1:0] cfg_slot,
  input  rep_t              cfg_n,
  input  logic [PRIO_W-1:0] cfg_prio,
  input  logic [N_SLOTS-1:0] cfg_prec,
  input  constraint_t       cfg_cons [N_CONS],
  // burst issue towards the dispatch network, one per root port
  input  rep_t              free_cores  [N_PORTS],
  output logic              issue_valid [N_PORTS],
  output logic [SLOT_W-1:0] issue_task  [N_PORTS],
  output rep_t              issue_first [N_PORTS],
  output rep_t              issue_count [N_PORTS],
  // arrivals reported by the dispatch network
  input  logic              arr_valid [N_PORTS],
  input  logic [SLOT_W-1:0] arr_task  [N_PORTS],
  input  rep_t              arr_count [N_PORTS],
  // completions: core j finished a replica of slot core_task[j]
  input  logic              core_done [N_CORES],
  input  logic [SLOT_W-1:0] core_task [N_CORES],
  // thread ROB requests and results
  output logic              rob_sel_valid   [N_ROB],
  output logic [SLOT_W-1:0] rob_sel_task    [N_ROB],
  output logic              rob_sel_tag     [N_ROB],
  output rep_t              rob_sel_arrived [N_ROB],
  input  logic              rob_out_valid   [N_ROB],
  input  logic [SLOT_W-1:0] rob_out_task    [N_ROB],
  input  logic              rob_out_tag     [N_ROB],
  input  rep_t              rob_out_es      [N_ROB],
  // status
  output task_state_t       slot_state   [N_SLOTS],
  output logic [N_SLOTS-1:0] slot_loaded,
  output logic [N_SLOTS-1:0] slot_done,      // c == n
  output logic [N_SLOTS-1:0] slot_runnable,  // loaded, precedence met, s < n
  output logic [N_SLOTS-1:0] slot_blocked    // runnable but a directive holds it
);

  localparam int unsigned SLOTS_PER_ROB = (N_SLOTS + N_ROB - 1) / N_ROB;
  localparam int unsigned SEQ_W = (SLOTS_PER_ROB > 1) ? $clog2(SLOTS_PER_ROB) : 1;

  task_state_t       st      [N_SLOTS];
  rep_t              arrived [N_SLOTS];
  logic [PRIO_W-1:0] prio    [N_SLOTS];
  logic [N_SLOTS-1:0] prec   [N_SLOTS];
  constraint_t       cons    [N_SLOTS][N_CONS];
  logic [N_SLOTS-1:0] loaded;
  logic [N_SLOTS-1:0] gen;
  logic [SEQ_W-1:0]  seq     [N_ROB];

  // ---------------------------------------------------------------- directives
  rep_t allowed [N_SLOTS];
  logic blocked [N_SLOTS];
  logic [N_SLOTS-1:0] partners_loaded;   // every partner a constraint names is loaded
  logic [N_SLOTS-1:0] names [N_SLOTS];  // names[x][y]: a constraint of x names y
  rep_t free_total;

  for (genvar x = 0; x < N_SLOTS; x++) begin : g_eval
    task_state_t partner_st [N_CONS];
    always_comb
      for (int k = 0; k < N_CONS; k++)
        partner_st[k] = (int'(cons[x][k].partner) < N_SLOTS)
                        ? st[cons[x][k].partner[SLOT_W-1:0]] : st[x];
    always_comb begin
      partners_loaded[x] = 1'b1;
      names[x]           = '0;
      for (int k = 0; k < N_CONS; k++)
        if (cons[x][k].kind inside {DIR_SAC, DIR_SAS_LO, DIR_SAS_HI, DIR_ACF, DIR_SAMC}) begin
          if (int'(cons[x][k].partner) < N_SLOTS)
            names[x][cons[x][k].partner[SLOT_W-1:0]] = 1'b1;
          if (!(int'(cons[x][k].partner) < N_SLOTS
                && loaded[cons[x][k].partner[SLOT_W-1:0]]))
            partners_loaded[x] = 1'b0;
        end
    end
    directive_eval #(.N_CONS(N_CONS)) u_eval (
      .self_st    (st[x]),
      .cons       (cons[x]),
      .partner_st (partner_st),
      .free_cores (free_total),
      .allowed    (allowed[x]),
      .blocked    (blocked[x])
    );
  end

  // ------------------------------------------------------------------ status
  always_comb begin
    for (int x = 0; x < N_SLOTS; x++) begin
      slot_state[x] = st[x];
      slot_done[x]  = loaded[x] && (st[x].c == st[x].n);
    end
    for (int x = 0; x < N_SLOTS; x++) begin
      slot_runnable[x] = loaded[x] && (st[x].s < st[x].n) && partners_loaded[x]
                         && ((prec[x] & ~slot_done) == '0);
      slot_blocked[x]  = slot_runnable[x] && blocked[x];
    end
    slot_loaded = loaded;
  end

  // --------------------------------------------------------------- selection
  always_comb begin
    free_total = '0;
    for (int p = 0; p < N_PORTS; p++) free_total += free_cores[p];
  end

  rep_t issued [N_SLOTS];   // replicas issued per slot this cycle

  always_comb begin
    automatic logic [N_SLOTS-1:0] used    = '0;
    automatic logic               cur_ok  = 1'b0;
    automatic logic [SLOT_W-1:0]  cur     = '0;
    automatic rep_t               cur_rem = '0;
    automatic rep_t               cur_nxt = '0;
    for (int x = 0; x < N_SLOTS; x++) issued[x] = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      issue_valid[p] = 1'b0;
      issue_task[p]  = '0;
      issue_first[p] = '0;
      issue_count[p] = '0;
      if (free_cores[p] != '0) begin
        if (!(cur_ok && cur_rem != '0)) begin
          // next slot in priority order, not yet chosen, not tied to a chosen one
          automatic logic              found = 1'b0;
          automatic logic [SLOT_W-1:0] best  = '0;
          for (int x = 0; x < N_SLOTS; x++) begin
            automatic logic tied = 1'b0;
            for (int y = 0; y < N_SLOTS; y++)
              if (used[y] && (names[x][y] || names[y][x])) tied = 1'b1;
            if (slot_runnable[x] && allowed[x] != '0 && !used[x] && !tied
                && (!found || prio[x] > prio[best])) begin
              found = 1'b1;
              best  = SLOT_W'(x);
            end
          end
          cur_ok = found;
          if (found) begin
            cur        = best;
            cur_rem    = allowed[best];
            cur_nxt    = st[best].s;
            used[best] = 1'b1;
          end
        end
        if (cur_ok && cur_rem != '0) begin
          issue_valid[p] = 1'b1;
          issue_task[p]  = cur;
          issue_first[p] = cur_nxt;
          issue_count[p] = (cur_rem < free_cores[p]) ? cur_rem : free_cores[p];
          cur_rem        = cur_rem - issue_count[p];
          cur_nxt        = cur_nxt + issue_count[p];
          issued[cur]    = issued[cur] + issue_count[p];
        end
      end
    end
  end

  // ------------------------------------------------------ completion counts
  rep_t done_cnt [N_SLOTS];
  always_comb
    for (int x = 0; x < N_SLOTS; x++) begin
      done_cnt[x] = '0;
      for (int j = 0; j < N_CORES; j++)
        if (core_done[j] && core_task[j] == SLOT_W'(x)) done_cnt[x] += rep_t'(1);
    end

  rep_t arr_sum [N_SLOTS];
  always_comb
    for (int x = 0; x < N_SLOTS; x++) begin
      arr_sum[x] = '0;
      for (int p = 0; p < N_PORTS; p++)
        if (arr_valid[p] && arr_task[p] == SLOT_W'(x)) arr_sum[x] += arr_count[p];
    end

  // ---------------------------------------------------------- ROB requests
  always_comb
    for (int r = 0; r < N_ROB; r++) begin
      automatic int unsigned slot = r + N_ROB * int'(seq[r]);
      rob_sel_valid[r]   = slot < N_SLOTS;
      rob_sel_task[r]    = SLOT_W'(slot);
      rob_sel_tag[r]     = (slot < N_SLOTS) ? gen[SLOT_W'(slot)] : 1'b0;
      rob_sel_arrived[r] = (slot < N_SLOTS) ? arrived[SLOT_W'(slot)] : '0;
    end

  // ------------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded <= '0;
      gen    <= '0;
      for (int x = 0; x < N_SLOTS; x++) begin
        st[x]      <= '0;
        arrived[x] <= '0;
        prio[x]    <= '0;
        prec[x]    <= '0;
        for (int k = 0; k < N_CONS; k++) cons[x][k] <= '0;
      end
      for (int r = 0; r < N_ROB; r++) seq[r] <= '0;
    end else begin
      for (int r = 0; r < N_ROB; r++)
        seq[r] <= (int'(seq[r]) + 1 >= SLOTS_PER_ROB) ? '0 : seq[r] + SEQ_W'(1);

      for (int x = 0; x < N_SLOTS; x++) begin
        st[x].c <= st[x].c + done_cnt[x];
        arrived[x] <= arrived[x] + arr_sum[x];
        st[x].s    <= st[x].s + issued[x];
      end

      for (int r = 0; r < N_ROB; r++)
        if (rob_out_valid[r] && rob_out_tag[r] == gen[rob_out_task[r]])
          st[rob_out_task[r]].es <= rob_out_es[r];

      if (cfg_clear) loaded <= '0;
      if (cfg_we) begin
        loaded[cfg_slot]   <= 1'b1;
        gen[cfg_slot]      <= ~gen[cfg_slot];
        st[cfg_slot]       <= '{n: cfg_n, s: '0, c: '0, es: '0};
        arrived[cfg_slot]  <= '0;
        prio[cfg_slot]     <= cfg_prio;
        prec[cfg_slot]     <= cfg_prec;
        for (int k = 0; k < N_CONS; k++) cons[cfg_slot][k] <= cfg_cons[k];
      end
    end
  end

  // A slot is only reloaded when none of its replicas is in flight.
  a_reload_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we && loaded[cfg_slot] |-> st[cfg_slot].s == st[cfg_slot].c);
  a_clear_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_clear |-> free_total == rep_t'(N_CORES));
  // Completions never overtake dispatches.
  for (genvar x = 0; x < N_SLOTS; x++) begin : g_chk
    a_c_le_s: assert property (@(posedge clk) disable iff (!rst_n)
      st[x].c <= st[x].s && st[x].s <= st[x].n);
  end

endmodule
