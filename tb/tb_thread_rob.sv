// tb_thread_rob: self-checking test of the thread re-order buffer min-tree.
//
// Each cycle the core states (busy, task slot, replica index) and the
// requested task ID are randomised.  A reference value, the minimum replica
// index among busy cores of the requested task and the arrived count, is
// computed here and queued; the DUT must produce it exactly STAGES cycles
// later, which checks both the value and the 3-cycle latency quoted for a
// 64-core tree.  The request from the example figure (8 cores running
// (A,4) (B,1) (A,7) (A,9) (A,6) (A,10) (B,3) (B,4)) is applied first: es of
// A must be 4 and of B 1.
module tb_thread_rob;
  import sched_pkg::*;

  localparam int N_CORES = 64;
  localparam int STAGES  = 3;
  localparam int SLOT_W  = 2;

  logic              clk = 0, rst_n = 0;
  logic              core_busy [N_CORES];
  logic [SLOT_W-1:0] core_task [N_CORES];
  rep_t              core_rep  [N_CORES];
  logic              sel_valid;
  logic [SLOT_W-1:0] sel_task;
  logic [0:0]        sel_tag;
  rep_t              sel_arrived;
  logic              out_valid;
  logic [SLOT_W-1:0] out_task;
  logic [0:0]        out_tag;
  rep_t              out_es;

  int checks = 0, failures = 0, cycle = 0;

  thread_rob #(.N_CORES(N_CORES), .SLOT_W(SLOT_W), .TAG_W(1), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic v; logic [SLOT_W-1:0] t; logic tg; rep_t es; } exp_t;
  exp_t pipe [$];

  function automatic rep_t ref_es();
    rep_t m = sel_arrived;
    for (int j = 0; j < N_CORES; j++)
      if (core_busy[j] && core_task[j] == sel_task && core_rep[j] < m) m = core_rep[j];
    return m;
  endfunction

  task automatic drive_random(int it);
    for (int j = 0; j < N_CORES; j++) begin
      core_busy[j] = ($urandom % 4) != 0;
      core_task[j] = SLOT_W'($urandom);
      core_rep[j]  = (it % 5 == 0) ? rep_t'($urandom) : rep_t'($urandom % 300);
    end
    sel_valid   = 1'b1;
    sel_task    = SLOT_W'($urandom);
    sel_tag     = 1'($urandom);
    sel_arrived = (it % 7 == 0) ? rep_t'($urandom % 20) : rep_t'(200 + $urandom % 200);
    if (it % 11 == 0) for (int j = 0; j < N_CORES; j++) core_busy[j] = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N_CORES; j++) begin
      core_busy[j] = 0; core_task[j] = 0; core_rep[j] = 0;
    end
    sel_valid = 0; sel_task = 0; sel_tag = 0; sel_arrived = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Figure example: task A = slot 0, B = slot 1, cores 0..7.
    begin
      int ta [8] = '{0, 1, 0, 0, 0, 0, 1, 1};
      int ra [8] = '{4, 1, 7, 9, 6, 10, 3, 4};
      for (int ex = 0; ex < 2; ex++) begin
        @(negedge clk);
        for (int j = 0; j < 8; j++) begin
          core_busy[j] = 1; core_task[j] = SLOT_W'(ta[j]); core_rep[j] = rep_t'(ra[j]);
        end
        sel_valid = 1; sel_task = SLOT_W'(ex); sel_tag = 0; sel_arrived = 11;
        repeat (STAGES) @(negedge clk);
        checks++;
        if (out_es != rep_t'(ex == 0 ? 4 : 1) || out_task != SLOT_W'(ex)) begin
          failures++;
          $display("FAIL figure example task %0d: es=%0d", ex, out_es);
        end
      end
    end
    // Random streaming, a new request every cycle.
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      if (pipe.size() == STAGES) begin
        exp_t e;
        e = pipe.pop_front();
        checks++;
        if (out_valid != e.v || out_task != e.t || out_tag != e.tg || out_es != e.es) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: got v%0b t%0d es=%0d expected v%0b t%0d es=%0d",
                     it, out_valid, out_task, out_es, e.v, e.t, e.es);
        end
      end
      drive_random(it);
      #1;
      pipe.push_back('{v: sel_valid, t: sel_task, tg: sel_tag, es: ref_es()});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
