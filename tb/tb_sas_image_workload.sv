// tb_sas_image_workload: the gradient workload of the simulation study, run
// through the full-size system.
//
// Two duplicable tasks, the x and the y derivative of a 2000 x 2000 image,
// one replica per pixel (N_PIX replicas each), are paced by
// SAS(B,A,lmin,lmax) with lmin = 2 * cores = 128, the rule of thumb for the
// lower gap bound, and lmax = lmin + 64.  The core model runs every replica
// for 4..11 cycles.  The testbench checks each burst against the SAS bounds
// (started-count gap kept in [lmin, lmax] while both tasks still have
// replicas to start), that each replica completes once, that es ends at n,
// and reports the cycle count and the smallest and largest gap seen.  Set
// N_PIX lower for a quick run.
module tb_sas_image_workload;
  import sched_pkg::*;

  localparam int N_CORES = 64;
  localparam int N_SLOTS = 4;
  localparam int N_CONS  = 2;
  localparam int PRIO_W  = 4;
  localparam int SLOT_W  = 2;
  localparam int N_PIX   = 2000 * 2000;
  localparam int LMIN    = 2 * N_CORES;
  localparam int LMAX    = LMIN + 64;

  logic               clk = 0, rst_n = 0;
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
  localparam int N_PORTS = 4;
  logic               issue_valid [N_PORTS];
  logic [SLOT_W-1:0]  issue_task  [N_PORTS];
  rep_t               issue_first [N_PORTS];
  rep_t               issue_count [N_PORTS];
  rep_t               free_cores  [N_PORTS];

  hypercore_sched_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int run_left [N_CORES];
  logic [SLOT_W-1:0] run_task [N_CORES];
  longint s_ref [2], c_ref [2];
  int gap_min = 1 << 30, gap_max = -(1 << 30);
  longint cycles = 0;
  int held_a = 0, held_b = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  task automatic load(int x, dir_kind_e k, int partner, int arg, int prio);
    @(negedge clk);
    cfg_we = 1; cfg_slot = SLOT_W'(x); cfg_n = rep_t'(N_PIX); cfg_prio = PRIO_W'(prio);
    cfg_prec = '0;
    cfg_addr = addr_t'(32'h0001_0000 * (x + 1));
    cfg_cons[0] = '{kind: k, partner: 8'(partner), arg: cnt_t'(arg)};
    cfg_cons[1] = '{kind: DIR_NONE, partner: 8'd0, arg: '0};
  endtask

  initial begin
    // 8e6 replicas on 64 cores at 4..11 cycles: about 1e6 cycles
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_clear = 0; cfg_we = 0; cfg_slot = 0; cfg_n = 0; cfg_prio = 0; cfg_prec = 0;
    for (int k = 0; k < N_CONS; k++) cfg_cons[k] = '0;
    cfg_addr = '0;
    for (int j = 0; j < N_CORES; j++) begin core_done[j] = 0; run_left[j] = 0; run_task[j] = 0; end
    s_ref = '{0, 0}; c_ref = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // slot 1 = B (y derivative) trails A by at least LMIN; slot 0 = A
    // (x derivative) leads B by at most LMAX.  A has the higher priority, so
    // it runs up to LMAX ahead and B fills the cores A may not take.
    load(1, DIR_SAS_LO, 0, LMIN, 1);
    load(0, DIR_SAS_HI, 1, LMAX, 2);
    while (!(slot_done[0] && slot_done[1])) begin
      @(negedge clk);
      cfg_we = 0;
      cycles++;
      for (int p = 0; p < N_PORTS; p++)
        if (issue_valid[p]) begin
          int x;
          longint gap;
          x = int'(issue_task[p]);
          checks++;
          if (longint'(issue_first[p]) != s_ref[x]) fail("burst does not start at s");
          if (x == 1 && s_ref[0] != N_PIX && s_ref[0] - (s_ref[1] + issue_count[p]) < LMIN)
            fail("B came closer than lmin to A");
          if (x == 0 && s_ref[1] != N_PIX && (s_ref[0] + issue_count[p]) - s_ref[1] > LMAX)
            fail("A ran further than lmax ahead of B");
          s_ref[x] += issue_count[p];
          gap = s_ref[0] - s_ref[1];
          if (s_ref[0] != N_PIX && s_ref[1] > 0) begin
            if (gap < gap_min) gap_min = int'(gap);
            if (gap > gap_max) gap_max = int'(gap);
          end
        end
      begin
        int free_total;
        free_total = 0;
        for (int p = 0; p < N_PORTS; p++) free_total += int'(free_cores[p]);
        if (slot_blocked[0] && free_total != 0) held_a++;
        if (slot_blocked[1] && free_total != 0) held_b++;
      end
      for (int j = 0; j < N_CORES; j++) begin
        if (core_disp_valid[j]) begin
          checks++;
          if (core_disp_addr[j] != addr_t'(32'h0001_0000 * (int'(core_disp_task[j]) + 1)))
            fail("core got the wrong start address");
          run_left[j] = 4 + ($urandom % 8);
          run_task[j] = core_disp_task[j];
        end
        core_done[j] = 1'b0;
        if (run_left[j] > 0 && !core_disp_valid[j]) begin
          run_left[j]--;
          if (run_left[j] == 0) begin
            core_done[j] = 1'b1;
            c_ref[run_task[j]]++;
          end
        end
      end
    end
    repeat (10) @(negedge clk);
    for (int x = 0; x < 2; x++) begin
      checks++;
      if (slot_state[x].s != rep_t'(N_PIX) || slot_state[x].c != rep_t'(N_PIX)
          || slot_state[x].es != rep_t'(N_PIX) || c_ref[x] != N_PIX)
        fail($sformatf("slot %0d ended with s=%0d c=%0d es=%0d", x,
                       slot_state[x].s, slot_state[x].c, slot_state[x].es));
    end
    checks++;
    if (held_a == 0 || held_b == 0) fail("SAS never held one of the tasks");
    $display("image workload: %0d replicas per task, %0d cycles, gap %0d..%0d, held A %0d B %0d",
             N_PIX, cycles, gap_min, gap_max, held_a, held_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
