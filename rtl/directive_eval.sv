// directive_eval: number of replicas of one duplicable task that its
// scheduling directives allow to be dispatched right now.
//
// Every directive is reduced to a closed-form count computed from the
// per-task state (n, s, c, es) of the task itself (X) and of the partner task
// (P) the constraint refers to:
//   SAC(X,P,l)        P.es - X.s - l                      (eq. 4.3)
//   SAS lower bound   (P.s - X.s) - lmin   X trails P     (eq. 4.7)
//   SAS upper bound   lmax - (X.s - P.s)   X leads P      (eq. 4.6)
//   LNAR(K)           K - (X.s - X.c)                     (eq. 4.10)
//   ACF(X,P)          ceil(((P.s-P.c) - (X.s-X.c) + free) / 2)
//   LNR(K)            K - (X.s - X.es)                    (eq. 4.14)
//   SAMC(X,P,M)       P.es / M - X.s                      (eq. 4.16)
// The task's result is the minimum over its N_CONS constraint entries and its
// remaining replicas n - s, clamped at zero, as the document prescribes for a
// task with several constraints.  The formulas are the document's; the
// following are this design's choices: a constraint on a partner stops
// binding once the partner can no longer move (all of P started for the SAS
// and ACF forms, all of P completed for SAC and SAMC), which is how "a
// dependence on a replica that does not exist is met" is carried to the end
// of a task; ACF splits the currently free cores so that the two active
// counts end up within one of each other (the document only gives the
// difference of eq. 4.12); SAMC rounds up once P has completed, so a final
// partial group of P does not block the last replica of X; M = 0 counts as 1.
//
// Purely combinational; the scheduler registers the state it feeds in.
module directive_eval
  import sched_pkg::*;
#(
  parameter int unsigned N_CONS = 2
) (
  input  task_state_t  self_st,               // state of task X
  input  constraint_t  cons    [N_CONS],      // X's constraint entries
  input  task_state_t  partner_st [N_CONS],   // state of each entry's partner
  input  rep_t         free_cores,            // cores free for a new dispatch
  output rep_t         allowed,               // replicas X may dispatch now
  output logic         blocked                // a directive (not n) holds X at 0
);

  // Largest count any rule can need: it is capped by n - s anyway.
  localparam cnt_t UNBOUNDED = cnt_t'({2'b00, {REP_W{1'b1}}});

  cnt_t rule [N_CONS];

  always_comb begin
    for (int k = 0; k < N_CONS; k++) begin
      automatic task_state_t p     = partner_st[k];
      automatic cnt_t        xs    = to_cnt(self_st.s);
      automatic cnt_t        ps    = to_cnt(p.s);
      automatic cnt_t        x_act = to_cnt(self_st.s) - to_cnt(self_st.c);
      automatic cnt_t        p_act = to_cnt(p.s) - to_cnt(p.c);
      automatic logic        p_all_started   = (p.s == p.n);
      automatic logic        p_all_completed = (p.c == p.n);
      automatic rep_t        m     = (cons[k].arg <= 0) ? rep_t'(1) : rep_t'(cons[k].arg);
      automatic rep_t        q;
      automatic cnt_t        acf_num;
      unique case (cons[k].kind)
        DIR_SAC:    rule[k] = p_all_completed ? UNBOUNDED
                                              : to_cnt(p.es) - xs - cons[k].arg;
        DIR_SAS_LO: rule[k] = p_all_started ? UNBOUNDED : (ps - xs) - cons[k].arg;
        DIR_SAS_HI: rule[k] = p_all_started ? UNBOUNDED : cons[k].arg - (xs - ps);
        DIR_LNAR:   rule[k] = cons[k].arg - x_act;
        DIR_ACF: begin
          acf_num = p_act - x_act + to_cnt(free_cores) + cnt_t'(1);
          rule[k] = p_all_started ? UNBOUNDED : (acf_num >>> 1);
        end
        DIR_LNR:    rule[k] = cons[k].arg - (xs - to_cnt(self_st.es));
        DIR_SAMC: begin
          q = p_all_completed ? rep_t'((p.es + m - rep_t'(1)) / m) : rep_t'(p.es / m);
          rule[k] = to_cnt(q) - xs;
        end
        default:    rule[k] = UNBOUNDED;
      endcase
    end
  end

  always_comb begin
    automatic cnt_t best = to_cnt(self_st.n) - to_cnt(self_st.s);
    automatic cnt_t dir  = UNBOUNDED;
    for (int k = 0; k < N_CONS; k++)
      if (rule[k] < dir) dir = rule[k];
    blocked = (dir <= 0);
    if (dir < best) best = dir;
    if (best < 0) best = '0;
    allowed = rep_t'(best);
  end

endmodule
