// tb_dispatch_network: self-checking test of the burst dispatch tree.
//
// On each of the N_PORTS root ports a random issuer sends bursts (random
// task slot, running replica index, random count up to that port's
// free-core count), often on several ports in the same cycle, and a core
// model finishes each replica after a random number of cycles.  Checked
// here, against a model kept in the testbench:
//   - every burst reaches the cores of its port's subtree exactly
//     log2(N_CORES/N_PORTS)+1 cycles after issue, each replica on exactly one
//     core that was idle, indices ascending with the core number;
//   - the port's arrival summary names the burst's slot and count in that
//     cycle;
//   - each port's free_cores equals the idle cores of its subtree minus the
//     replicas in flight to it.
module tb_dispatch_network;
  import sched_pkg::*;

  localparam int N_CORES = 64;
  localparam int N_PORTS = 4;
  localparam int PER     = N_CORES / N_PORTS;
  localparam int SLOT_W  = 2;
  localparam int LAT     = $clog2(PER) + 1;

  logic              clk = 0, rst_n = 0;
  logic              issue_valid [N_PORTS];
  logic [SLOT_W-1:0] issue_task  [N_PORTS];
  rep_t              issue_first [N_PORTS];
  rep_t              issue_count [N_PORTS];
  rep_t              free_cores  [N_PORTS];
  logic              core_disp_valid [N_CORES];
  logic [SLOT_W-1:0] core_disp_task  [N_CORES];
  rep_t              core_disp_rep   [N_CORES];
  logic              core_done       [N_CORES];
  logic              arr_valid [N_PORTS];
  logic [SLOT_W-1:0] arr_task  [N_PORTS];
  rep_t              arr_count [N_PORTS];

  dispatch_network #(.N_CORES(N_CORES), .N_PORTS(N_PORTS), .SLOT_W(SLOT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int busy_left [N_CORES];     // remaining cycles of the replica on a core, 0 = idle
  int inflight  [N_PORTS];
  int cyc       = 0;
  int bursts    = 0, split_bursts = 0, multi_port_cycles = 0;
  rep_t next_rep = 0;

  typedef struct { int due; logic [SLOT_W-1:0] t; rep_t first; rep_t cnt; } burst_rec_t;
  burst_rec_t q [N_PORTS][$];

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N_PORTS; p++) begin
      issue_valid[p] = 0; issue_task[p] = 0; issue_first[p] = 0; issue_count[p] = 0;
      inflight[p] = 0;
    end
    for (int j = 0; j < N_CORES; j++) begin core_done[j] = 0; busy_left[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) begin
        // ---- check the outputs of this cycle
        int idle_now;
        idle_now = 0;
        for (int j = p * PER; j < (p + 1) * PER; j++) if (busy_left[j] == 0) idle_now++;
        checks++;
        if (int'(free_cores[p]) != idle_now - inflight[p])
          fail($sformatf("port %0d free_cores=%0d expected %0d", p, free_cores[p], idle_now - inflight[p]));
        if (q[p].size() != 0 && q[p][0].due == cyc) begin
          burst_rec_t b;
          rep_t expect_rep;
          int got;
          got = 0;
          b = q[p].pop_front();
          expect_rep = b.first;
          for (int j = p * PER; j < (p + 1) * PER; j++)
            if (core_disp_valid[j]) begin
              got++;
              checks++;
              if (busy_left[j] != 0) fail($sformatf("core %0d busy but dispatched", j));
              if (core_disp_rep[j] != expect_rep || core_disp_task[j] != b.t)
                fail($sformatf("core %0d got rep %0d expected %0d", j, core_disp_rep[j], expect_rep));
              expect_rep++;
              busy_left[j] = 1 + ($urandom % 40);
            end
          checks++;
          if (got != int'(b.cnt)) fail($sformatf("port %0d burst of %0d arrived on %0d cores", p, b.cnt, got));
          checks++;
          if (!arr_valid[p] || arr_task[p] != b.t || arr_count[p] != b.cnt)
            fail($sformatf("port %0d arrival summary wrong", p));
          inflight[p] -= int'(b.cnt);
        end else begin
          for (int j = p * PER; j < (p + 1) * PER; j++)
            if (core_disp_valid[j]) fail($sformatf("unexpected dispatch on core %0d", j));
          if (arr_valid[p]) fail($sformatf("unexpected arrival summary on port %0d", p));
        end
      end
      // ---- core model: count down, pulse done (cores dispatched just now
      // were set busy above and count from the next cycle)
      for (int j = 0; j < N_CORES; j++) begin
        core_done[j] = 1'b0;
        if (busy_left[j] > 0 && !core_disp_valid[j]) begin
          busy_left[j]--;
          if (busy_left[j] == 0) core_done[j] = 1'b1;
        end
      end
      // ---- issuers
      begin
        int n_issued;
        n_issued = 0;
        for (int p = 0; p < N_PORTS; p++) begin
          issue_valid[p] = 1'b0;
          if (free_cores[p] != 0 && ($urandom % 3) != 0) begin
            issue_valid[p] = 1'b1;
            issue_task[p]  = SLOT_W'($urandom);
            issue_count[p] = rep_t'(1 + ($urandom % int'(free_cores[p])));
            if ($urandom % 4 == 0) issue_count[p] = 1;
            issue_first[p] = next_rep;
            next_rep      += issue_count[p];
            inflight[p]   += int'(issue_count[p]);
            bursts++;
            n_issued++;
            if (issue_count[p] > 1) split_bursts++;
            q[p].push_back('{due: cyc + LAT, t: issue_task[p], first: issue_first[p], cnt: issue_count[p]});
          end
        end
        if (n_issued > 1) multi_port_cycles++;
      end
    end
    checks++;
    if (bursts < 100 || split_bursts < 20 || multi_port_cycles < 20) fail("too few bursts exercised");
    $display("bursts=%0d multi-replica=%0d cycles with several ports=%0d", bursts, split_bursts, multi_port_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
