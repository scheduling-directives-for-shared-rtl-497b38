// thread_rob: thread re-order buffer, the logarithmic min-tree that yields
// es, the lowest replica index of a task that has been started but has not
// completed.
//
// Every core reports whether it is busy and the (task slot, replica index)
// it is running.  A leaf passes the replica index only if the core is busy
// and its task slot equals sel_task; otherwise it passes the null index (all
// ones).  log2(N_CORES) levels of two-input minimum nodes reduce the leaves
// to one value, the lowest active replica of the selected task.  Because
// replicas of a task are handed out in index order, every replica below
// sel_arrived (the number of the task's replicas that had reached a core
// when the leaves were sampled) is either active, and therefore seen by the
// tree, or completed.  So es = min(tree minimum, sel_arrived): when no
// replica is active es equals the number that have arrived.
//
// The tree, the task-ID filter at the leaves and the single time-multiplexed
// tree that is handed a different task ID each cycle follow the document.
// Pipelining is the document's option; STAGES register ranks are spread
// evenly over the levels (3 by default, the cycle count the document quotes
// for 64 cores).  The sel_arrived correction, the null encoding and the tag
// that travels with each result are this design's choices.
//
// Timing: the result for the inputs sampled in cycle t appears in out_* in
// cycle t + STAGES (combinational when STAGES = 0).  A new task ID may be
// given every cycle.
module thread_rob
  import sched_pkg::*;
#(
  parameter int unsigned N_CORES = 64,
  parameter int unsigned SLOT_W  = 2,
  parameter int unsigned TAG_W   = 1,
  parameter int unsigned STAGES  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              core_busy [N_CORES],
  input  logic [SLOT_W-1:0] core_task [N_CORES],
  input  rep_t              core_rep  [N_CORES],
  input  logic              sel_valid,
  input  logic [SLOT_W-1:0] sel_task,
  input  logic [TAG_W-1:0]  sel_tag,
  input  rep_t              sel_arrived,
  output logic              out_valid,
  output logic [SLOT_W-1:0] out_task,
  output logic [TAG_W-1:0]  out_tag,
  output rep_t              out_es
);

  localparam int unsigned LEVELS = (N_CORES <= 1) ? 1 : $clog2(N_CORES);
  localparam int unsigned N_PAD  = 1 << LEVELS;

  typedef struct packed {
    logic              valid;
    logic [SLOT_W-1:0] task_id;
    logic [TAG_W-1:0]  tag;
    rep_t              arrived;
  } side_t;

  rep_t  leaf [N_PAD];
  side_t leaf_side;

  always_comb begin
    for (int j = 0; j < N_PAD; j++) begin
      if (j < N_CORES && core_busy[j] && core_task[j] == sel_task)
        leaf[j] = core_rep[j];
      else
        leaf[j] = REP_NULL;
    end
    leaf_side = '{valid: sel_valid, task_id: sel_task, tag: sel_tag, arrived: sel_arrived};
  end

  for (genvar i = 0; i < LEVELS; i++) begin : g_level
    localparam int unsigned W_IN  = N_PAD >> i;
    localparam int unsigned W_OUT = N_PAD >> (i + 1);
    // A register rank closes level i when it crosses a multiple of
    // LEVELS/STAGES.
    localparam bit REG = ((i + 1) * STAGES / LEVELS) != (i * STAGES / LEVELS);
    rep_t  v_in  [W_IN];
    side_t s_in;
    rep_t  mins  [W_OUT];
    rep_t  v_out [W_OUT];
    side_t s_out;

    if (i == 0) begin : g_first
      assign v_in = leaf;
      assign s_in = leaf_side;
    end else begin : g_next
      assign v_in = g_level[i-1].v_out;
      assign s_in = g_level[i-1].s_out;
    end

    always_comb
      for (int j = 0; j < W_OUT; j++)
        mins[j] = (v_in[2*j] < v_in[2*j+1]) ? v_in[2*j] : v_in[2*j+1];

    if (REG) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          s_out <= '0;
          for (int j = 0; j < W_OUT; j++) v_out[j] <= REP_NULL;
        end else begin
          s_out <= s_in;
          for (int j = 0; j < W_OUT; j++) v_out[j] <= mins[j];
        end
      end
    end else begin : g_comb
      assign s_out = s_in;
      assign v_out = mins;
    end
  end

  rep_t  root;
  side_t root_side;
  assign root      = g_level[LEVELS-1].v_out[0];
  assign root_side = g_level[LEVELS-1].s_out;

  always_comb begin
    out_valid = root_side.valid;
    out_task  = root_side.task_id;
    out_tag   = root_side.tag;
    out_es    = (root < root_side.arrived) ? root : root_side.arrived;
  end

endmodule
