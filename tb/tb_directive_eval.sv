// tb_directive_eval: self-checking test of directive_eval.
//
// Drives random task states and constraint entries of every kind and
// compares the permitted count with a reference computed here in 64-bit
// integer arithmetic from the directive formulas.  It also replays the
// worked SAS example (two cores, lmin = 2, lmax = 4): the counts at t = 1, 2
// and 3, with (A.s, B.s) = (2,0), (4,0), (4,2), must be (A 2, B 0), (A 0, B 2)
// and (A 2, B 0).
module tb_directive_eval;
  import sched_pkg::*;

  localparam int N_CONS = 2;

  task_state_t self_st;
  constraint_t cons [N_CONS];
  task_state_t partner_st [N_CONS];
  rep_t        free_cores;
  rep_t        allowed;
  logic        blocked;

  int checks = 0, failures = 0;

  directive_eval #(.N_CONS(N_CONS)) dut (.*);

  function automatic longint rule_ref(constraint_t c, task_state_t x, task_state_t p,
                                      longint free);
    longint big = 64'd16777215;
    longint xs = x.s, xc = x.c, xes = x.es, ps = p.s, pc = p.c, pes = p.es, pn = p.n;
    longint arg = longint'(c.arg);
    longint m = (arg <= 0) ? 1 : arg;
    case (c.kind)
      DIR_SAC:    return (pc == pn) ? big : pes - xs - arg;
      DIR_SAS_LO: return (ps == pn) ? big : (ps - xs) - arg;
      DIR_SAS_HI: return (ps == pn) ? big : arg - (xs - ps);
      DIR_LNAR:   return arg - (xs - xc);
      DIR_ACF: begin
        longint num = (ps - pc) - (xs - xc) + free + 1;
        longint q = (num >= 0) ? num / 2 : -((-num + 1) / 2);  // floor
        return (ps == pn) ? big : q;
      end
      DIR_LNR:    return arg - (xs - xes);
      DIR_SAMC:   return ((pc == pn) ? (pes + m - 1) / m : pes / m) - xs;
      default:    return big;
    endcase
  endfunction

  function automatic task_state_t rand_state(int maxn);
    task_state_t t;
    int n = 1 + ($urandom % maxn);
    int s = $urandom % (n + 1);
    int c = $urandom % (s + 1);
    int es = c + ($urandom % (s - c + 1));
    if ($urandom % 4 == 0) c = s;          // sometimes nothing is active
    if ($urandom % 8 == 0) begin s = n; c = n; es = n; end
    if (es < c) es = c;
    t.n = rep_t'(n); t.s = rep_t'(s); t.c = rep_t'(c); t.es = rep_t'(es);
    return t;
  endfunction

  task automatic check(string what);
    longint best = longint'(self_st.n) - longint'(self_st.s);
    longint dir = 64'd16777215;
    for (int k = 0; k < N_CONS; k++) begin
      longint r = rule_ref(cons[k], self_st, partner_st[k], longint'(free_cores));
      if (r < dir) dir = r;
    end
    if (dir < best) best = dir;
    if (best < 0) best = 0;
    checks++;
    if (longint'(allowed) != best || blocked != (dir <= 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: kinds %s/%s allowed=%0d expected=%0d blocked=%0b", what,
                 cons[0].kind.name(), cons[1].kind.name(), allowed, best, blocked);
    end
  endtask

  // Worked SAS example: A.s, B.s given, report both counts.
  task automatic sas_step(int as_, int bs, int exp_a, int exp_b);
    task_state_t a, b;
    a = '{n: 100, s: rep_t'(as_), c: rep_t'(as_), es: rep_t'(as_)};
    b = '{n: 100, s: rep_t'(bs),  c: rep_t'(bs),  es: rep_t'(bs)};
    // A's entry: SAS upper bound lmax = 4 against B
    self_st = a; partner_st[0] = b; partner_st[1] = b;
    cons[0] = '{kind: DIR_SAS_HI, partner: 8'd1, arg: cnt_t'(4)};
    cons[1] = '{kind: DIR_NONE, partner: 8'd0, arg: '0};
    free_cores = 2;
    #1;
    checks++;
    if (allowed != rep_t'(exp_a)) begin
      failures++; $display("FAIL SAS example A.s=%0d B.s=%0d: dispatch_A=%0d expected %0d", as_, bs, allowed, exp_a);
    end
    // B's entry: SAS lower bound lmin = 2 against A
    self_st = b; partner_st[0] = a;
    cons[0] = '{kind: DIR_SAS_LO, partner: 8'd0, arg: cnt_t'(2)};
    #1;
    checks++;
    if (allowed != rep_t'(exp_b)) begin
      failures++; $display("FAIL SAS example A.s=%0d B.s=%0d: dispatch_B=%0d expected %0d", as_, bs, allowed, exp_b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: t=1 (2,0), t=2 (4,0), t=3 (4,2)
    sas_step(2, 0, 2, 0);
    sas_step(4, 0, 0, 2);   // A.s - B.s = lmax: A must wait
    sas_step(4, 2, 2, 0);
    // random vectors, every kind in both entries
    for (int it = 0; it < 20000; it++) begin
      int maxn = (it % 3 == 0) ? 8 : 200;
      self_st = rand_state(maxn);
      for (int k = 0; k < N_CONS; k++) begin
        partner_st[k] = rand_state(maxn);
        cons[k].kind    = dir_kind_e'($urandom % 8);
        cons[k].partner = 8'($urandom % 4);
        cons[k].arg     = cnt_t'(int'($urandom % 20) - 4);
      end
      if ($urandom % 2) cons[1].kind = DIR_NONE;
      if (cons[0].kind == DIR_LNAR || cons[0].kind == DIR_LNR || cons[0].kind == DIR_SAMC)
        if (cons[0].arg < 0) cons[0].arg = -cons[0].arg;
      free_cores = rep_t'($urandom % 65);
      #1;
      check($sformatf("vector %0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
