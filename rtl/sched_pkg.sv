// sched_pkg: types and constants shared by the task scheduler, the directive
// evaluator, the dispatch tree and the thread re-order buffers.
//
// Replica indices are 0-based unsigned numbers of REP_W bits.  The all-ones
// value is reserved as the "null" index an idle core reports to the thread
// ROB, so a task may have at most 2**REP_W - 2 replicas.  Directive counts are
// computed in CNT_W-bit signed arithmetic (two guard bits) and clamped at 0.
package sched_pkg;

  // Width of a replica index / replica count.  The evaluated image workload
  // has 4e6 replicas per task, which needs 22 bits; 24 leaves headroom.
  localparam int unsigned REP_W = 24;
  localparam int unsigned CNT_W = REP_W + 2;

  typedef logic [REP_W-1:0]        rep_t;
  typedef logic signed [CNT_W-1:0] cnt_t;

  localparam rep_t REP_NULL = '1;

  // Width of a task's start address, handed to a core with each replica.
  localparam int unsigned ADDR_W = 32;
  typedef logic [ADDR_W-1:0] addr_t;

  // Kinds of per-task constraint.  Each constraint entry of task X names a
  // partner task P (ignored where the rule involves X alone) and up to two
  // integer arguments.
  typedef enum logic [2:0] {
    DIR_NONE   = 3'd0,  // no constraint
    DIR_SAC    = 3'd1,  // SAC(X,P,l):       P.es - X.s - l             (4.3)
    DIR_SAS_LO = 3'd2,  // SAS(X,P,lmin,.):  (P.s - X.s) - lmin         (4.7)
    DIR_SAS_HI = 3'd3,  // SAS(P,X,.,lmax):  lmax - (X.s - P.s)         (4.6)
    DIR_LNAR   = 3'd4,  // LNAR(X,K):        K - (X.s - X.c)            (4.10)
    DIR_ACF    = 3'd5,  // ACF(X,P):         fair split of free cores   (4.11/4.12)
    DIR_LNR    = 3'd6,  // LNR(X,K):         K - (X.s - X.es)           (4.14)
    DIR_SAMC   = 3'd7   // SAMC(X,P,M):      P.es / M - X.s             (4.16)
  } dir_kind_e;

  typedef struct packed {
    dir_kind_e   kind;
    logic [7:0]  partner;  // task slot of the partner task
    cnt_t        arg;      // l, lmin, lmax, K or M
  } constraint_t;

  // Dynamic state of one duplicable task as seen by the directive logic.
  typedef struct packed {
    rep_t n;    // total number of replicas (static)
    rep_t s;    // replicas dispatched (started)
    rep_t c;    // replicas completed
    rep_t es;   // lowest started-but-not-completed replica index
  } task_state_t;

  function automatic cnt_t to_cnt(rep_t v);
    return cnt_t'({2'b00, v});
  endfunction

endpackage
