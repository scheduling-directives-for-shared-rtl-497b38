// tb_hypercore_sched_top: end-to-end test of the scheduler system at its
// default size (64 cores, 4 task slots, one 3-stage thread ROB per slot).
//
// sched_harness runs the four directive workloads through the complete
// system: scheduler, dispatch tree, core status and thread ROBs, with a
// random-latency core model.  See sched_harness for what is checked.
module tb_hypercore_sched_top;
  import sched_pkg::*;

  localparam int N_CORES = 64;
  localparam int N_SLOTS = 4;
  localparam int N_CONS  = 2;
  localparam int PRIO_W  = 4;
  localparam int SLOT_W  = 2;
  localparam int N_PORTS = 4;

  logic               clk, rst_n;
  logic               cfg_clear, cfg_we;
  logic [SLOT_W-1:0]  cfg_slot;
  rep_t               cfg_n;
  logic [PRIO_W-1:0]  cfg_prio;
  logic [N_SLOTS-1:0] cfg_prec;
  constraint_t        cfg_cons [N_CONS];
  addr_t              cfg_addr;
  logic               core_disp_valid [N_CORES];
  logic [SLOT_W-1:0]  core_disp_task  [N_CORES];
  rep_t               core_disp_rep   [N_CORES];
  addr_t              core_disp_addr  [N_CORES];
  logic               core_done       [N_CORES];
  task_state_t        slot_state    [N_SLOTS];
  logic [N_SLOTS-1:0] slot_loaded, slot_done, slot_runnable, slot_blocked;
  logic               issue_valid [N_PORTS];
  logic [SLOT_W-1:0]  issue_task  [N_PORTS];
  rep_t               issue_first [N_PORTS];
  rep_t               issue_count [N_PORTS];
  rep_t               free_cores  [N_PORTS];
  int                 checks, failures;
  logic               finished;

  hypercore_sched_top dut (.*);

  sched_harness #(.N_CORES(N_CORES), .N_SLOTS(N_SLOTS), .N_CONS(N_CONS),
                  .PRIO_W(PRIO_W), .SLOT_W(SLOT_W), .N_PORTS(N_PORTS)) harness (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk)
    if (finished) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
endmodule
