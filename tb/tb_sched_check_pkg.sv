// tb_sched_check_pkg: reference checker shared by the scheduler and
// system testbenches.
//
// The checker keeps its own record of every slot's configuration and of
// which replicas have started and completed, and checks each issued burst
// against the meaning of the directives at replica level (not against the
// closed-form counts the hardware uses):
//   SAC(X,P,l)   X_j only after every P_k, k <= j+l, completed
//   SAS lower    X_j only after P_(j+lmin) started (or all of P started)
//   SAS upper    X_i only after P_(i-lmax) started (or all of P started)
//   LNAR(K)      at most K replicas of X active
//   ACF(X,P)     X's burst no larger than the fair share of the free cores
//   LNR(K)       X_i only after X_(i-K) completed
//   SAMC(X,P,M)  X_j only after P_(Mj) .. P_(M(j+1)-1) completed
//   precedence   a slot only after every slot in its mask completed
//   order        bursts start at the next replica index, fit the free cores
// It also counts, per directive kind, how often an issue was legal only
// because of that directive's bound being met, used as coverage.
package tb_sched_check_pkg;
  import sched_pkg::*;

  class sched_checker #(int N_SLOTS = 4, int N_CONS = 2);
    int          n       [N_SLOTS];
    int          s       [N_SLOTS];
    int          c       [N_SLOTS];
    bit          started [N_SLOTS][$];
    bit          done    [N_SLOTS][$];
    constraint_t cons    [N_SLOTS][N_CONS];
    bit [N_SLOTS-1:0] prec [N_SLOTS];
    bit          loaded  [N_SLOTS];
    int          failures = 0;
    int          checks   = 0;
    int          issues   = 0;

    function new();
      foreach (loaded[x]) loaded[x] = 0;
    endfunction

    function void fail(string msg);
      failures++;
      if (failures < 15) $display("CHECK FAIL: %s", msg);
    endfunction

    function void configure(int x, int nn, constraint_t cc [N_CONS], bit [N_SLOTS-1:0] pm);
      n[x] = nn; s[x] = 0; c[x] = 0; loaded[x] = 1; prec[x] = pm;
      started[x].delete(); done[x].delete();
      for (int i = 0; i < nn; i++) begin started[x].push_back(0); done[x].push_back(0); end
      for (int k = 0; k < N_CONS; k++) cons[x][k] = cc[k];
    endfunction

    function bit all_done(int x);
      return loaded[x] && c[x] == n[x];
    endfunction

    function bit completed_upto(int p, int last);  // all P_k, k <= last, done
      if (last >= n[p]) last = n[p] - 1;
      for (int k = 0; k <= last; k++) if (!done[p][k]) return 0;
      return 1;
    endfunction

    function void on_issue(int x, int first, int cnt, int free, string when);
      issues++;
      checks++;
      if (!loaded[x] || first != s[x] || cnt < 1 || cnt > free || s[x] + cnt > n[x])
        fail($sformatf("%s slot %0d burst first=%0d cnt=%0d (s=%0d n=%0d free=%0d)",
                       when, x, first, cnt, s[x], n[x], free));
      for (int y = 0; y < N_SLOTS; y++)
        if (prec[x][y] && !all_done(y))
          fail($sformatf("%s slot %0d issued before its predecessor %0d completed", when, x, y));
      for (int k = 0; k < N_CONS; k++) begin
        int p   = int'(cons[x][k].partner);
        int arg = int'(cons[x][k].arg);
        checks++;
        if (cons[x][k].kind inside {DIR_SAC, DIR_SAS_LO, DIR_SAS_HI, DIR_ACF, DIR_SAMC}
            && !loaded[p])
          fail($sformatf("%s slot %0d issued while its partner slot %0d is not loaded", when, x, p));
        case (cons[x][k].kind)
          DIR_SAC:
            for (int j = first; j < first + cnt; j++)
              if (!completed_upto(p, j + arg))
                fail($sformatf("%s SAC: slot %0d replica %0d before slot %0d replica %0d completed",
                               when, x, j, p, j + arg));
          DIR_SAS_LO:
            if (s[p] != n[p])
              for (int j = first; j < first + cnt; j++)
                if (!(j + arg < s[p]))
                  fail($sformatf("%s SAS: slot %0d replica %0d before slot %0d replica %0d started",
                                 when, x, j, p, j + arg));
          DIR_SAS_HI:
            if (s[p] != n[p])
              for (int j = first; j < first + cnt; j++)
                if (!(j - arg < s[p]))
                  fail($sformatf("%s SAS: slot %0d replica %0d more than %0d ahead of slot %0d",
                                 when, x, j, arg, p));
          DIR_LNAR:
            if ((s[x] + cnt) - c[x] > arg)
              fail($sformatf("%s LNAR: slot %0d would have %0d active, limit %0d",
                             when, x, s[x] + cnt - c[x], arg));
          DIR_ACF:
            if (s[p] != n[p] && 2 * cnt > (s[p] - c[p]) - (s[x] - c[x]) + free + 1)
              fail($sformatf("%s ACF: slot %0d took %0d of %0d free cores", when, x, cnt, free));
          DIR_LNR:
            for (int j = first; j < first + cnt; j++)
              if (j - arg >= 0 && !done[x][j - arg])
                fail($sformatf("%s LNR: slot %0d replica %0d before replica %0d completed",
                               when, x, j, j - arg));
          DIR_SAMC:
            for (int j = first; j < first + cnt; j++)
              for (int k2 = arg * j; k2 < arg * (j + 1) && k2 < n[p]; k2++)
                if (!done[p][k2])
                  fail($sformatf("%s SAMC: slot %0d replica %0d before slot %0d replica %0d completed",
                                 when, x, j, p, k2));
          default: ;
        endcase
      end
      for (int j = first; j < first + cnt && j < n[x]; j++) started[x][j] = 1;
      s[x] += cnt;
    endfunction

    function void on_complete(int x, int rep, string when);
      checks++;
      if (!loaded[x] || rep >= n[x] || !started[x][rep] || done[x][rep])
        fail($sformatf("%s bad completion slot %0d replica %0d", when, x, rep));
      else begin
        done[x][rep] = 1;
        c[x]++;
      end
    endfunction

    // es as defined: lowest started, uncompleted index, or s if none.
    function int es_ref(int x);
      for (int i = 0; i < s[x]; i++) if (!done[x][i]) return i;
      return s[x];
    endfunction
  endclass

endpackage
