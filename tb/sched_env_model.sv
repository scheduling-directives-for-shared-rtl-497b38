// sched_env_model: task_scheduler in a behavioural environment, with the
// same ports as hypercore_sched_top, so that sched_harness can test the
// scheduler on its own.
//
// The dispatch tree is modelled as a fixed delay of LAT cycles: root port p
// serves cores p*N_CORES/N_PORTS upwards, and a burst issued on it reserves
// the lowest-numbered free cores of that range at once and reaches them LAT
// cycles later.  The thread ROBs are modelled as an ideal, zero-latency
// minimum over the core status registers.
module sched_env_model
  import sched_pkg::*;
#(
  parameter int unsigned N_CORES = 64,
  parameter int unsigned N_SLOTS = 4,
  parameter int unsigned N_CONS  = 2,
  parameter int unsigned N_ROB   = 2,
  parameter int unsigned PRIO_W  = 4,
  parameter int unsigned SLOT_W  = 2,
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned LAT     = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_clear,
  input  logic               cfg_we,
  input  logic [SLOT_W-1:0]  cfg_slot,
  input  rep_t               cfg_n,
  input  logic [PRIO_W-1:0]  cfg_prio,
  input  logic [N_SLOTS-1:0] cfg_prec,
  input  constraint_t        cfg_cons [N_CONS],
  input  addr_t              cfg_addr,
  output logic               core_disp_valid [N_CORES],
  output logic [SLOT_W-1:0]  core_disp_task  [N_CORES],
  output rep_t               core_disp_rep   [N_CORES],
  output addr_t              core_disp_addr  [N_CORES],
  input  logic               core_done       [N_CORES],
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

  localparam int unsigned PER_PORT = N_CORES / N_PORTS;

  logic              arr_valid [N_PORTS];
  logic [SLOT_W-1:0] arr_task  [N_PORTS];
  rep_t              arr_count [N_PORTS];
  logic              core_busy [N_CORES];
  logic              reserved  [N_CORES];
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
  ) dut (.*);

  // start addresses, as in hypercore_sched_top
  addr_t start_addr [N_SLOTS];
  always_ff @(posedge clk) if (cfg_we) start_addr[cfg_slot] <= cfg_addr;
  always_comb
    for (int j = 0; j < N_CORES; j++) core_disp_addr[j] = start_addr[core_disp_task[j]];

  // ideal es
  always_comb
    for (int r = 0; r < N_ROB; r++) begin
      rep_t m;
      m = rob_sel_arrived[r];
      for (int j = 0; j < N_CORES; j++)
        if (core_busy[j] && core_task[j] == rob_sel_task[r] && core_rep[j] < m) m = core_rep[j];
      rob_out_valid[r] = rob_sel_valid[r];
      rob_out_task[r]  = rob_sel_task[r];
      rob_out_tag[r]   = rob_sel_tag[r];
      rob_out_es[r]    = m;
    end

  always_comb
    for (int p = 0; p < N_PORTS; p++) begin
      int f;
      f = 0;
      for (int j = p * PER_PORT; j < (p + 1) * PER_PORT; j++) if (!core_busy[j] && !reserved[j]) f++;
      free_cores[p] = rep_t'(f);
    end

  typedef struct { int due; int core; logic [SLOT_W-1:0] t; rep_t rep; } flight_t;
  flight_t flights [$];
  typedef struct { int due; int port; logic [SLOT_W-1:0] t; rep_t cnt; } burst_t;
  burst_t bursts [$];
  int cyc = 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_CORES; j++) begin
        core_busy[j] <= 0; reserved[j] <= 0; core_task[j] <= 0; core_rep[j] <= 0;
        core_disp_valid[j] <= 0; core_disp_task[j] <= 0; core_disp_rep[j] <= 0;
      end
      for (int p = 0; p < N_PORTS; p++) begin
        arr_valid[p] <= 0; arr_task[p] <= 0; arr_count[p] <= 0;
      end
      flights.delete(); bursts.delete();
    end else begin
      cyc <= cyc + 1;
      // cores finishing
      for (int j = 0; j < N_CORES; j++) if (core_done[j]) core_busy[j] <= 0;
      // dispatches shown to the cores in this cycle become core status
      for (int j = 0; j < N_CORES; j++)
        if (core_disp_valid[j]) begin
          core_busy[j] <= 1; core_task[j] <= core_disp_task[j]; core_rep[j] <= core_disp_rep[j];
          reserved[j] <= 0;
        end
      // new bursts: reserve the lowest free cores of each port's range
      for (int p = 0; p < N_PORTS; p++)
        if (issue_valid[p]) begin
          int left;
          rep_t rep;
          left = int'(issue_count[p]);
          rep  = issue_first[p];
          for (int j = p * PER_PORT; j < (p + 1) * PER_PORT && left > 0; j++)
            if (!core_busy[j] && !reserved[j]) begin
              reserved[j] <= 1;
              flights.push_back('{due: cyc + LAT, core: j, t: issue_task[p], rep: rep});
              rep++; left--;
            end
          bursts.push_back('{due: cyc + LAT, port: p, t: issue_task[p], cnt: issue_count[p]});
        end
      // deliveries due now
      for (int j = 0; j < N_CORES; j++) core_disp_valid[j] <= 0;
      while (flights.size() != 0 && flights[0].due == cyc + 1) begin
        flight_t f;
        f = flights.pop_front();
        core_disp_valid[f.core] <= 1; core_disp_task[f.core] <= f.t; core_disp_rep[f.core] <= f.rep;
      end
      for (int p = 0; p < N_PORTS; p++) arr_valid[p] <= 0;
      while (bursts.size() != 0 && bursts[0].due == cyc + 1) begin
        burst_t b;
        b = bursts.pop_front();
        arr_valid[b.port] <= 1; arr_task[b.port] <= b.t; arr_count[b.port] <= b.cnt;
      end
    end
  end
endmodule
