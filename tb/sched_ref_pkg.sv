// sched_ref_pkg: reference model of the scheduler behind the call interface,
// used by the testbenches of alloc_wrapper and hw_scheduler.
//
// It is written independently of the RTL: element storage is a set of
// arrays searched linearly, the ready queue is a SystemVerilog queue kept
// sorted by signed priority with first-come first among equals, and the
// chosen element is kept apart from it. call() applies one method and
// returns whether it succeeded and, if so, its integer result. The model
// also counts how often each mechanism of the design was exercised.
package sched_ref_pkg;
  import sched_pkg::*;

  typedef struct {
    int unsigned id;
    longint      rank;
  } ent_t;

  class sched_ref;
    int unsigned n;
    bit   used[];
    int   val[];
    int   pri[];
    bit   in_s[];
    ent_t wait_q[$];
    bit   c_v;
    ent_t c;

    // Mechanism counters.
    int n_ok[16];
    int n_fail[16];
    int n_switch, n_keep, n_another, n_pool_full, n_destroy_queued, n_idle_choose;

    function new(int unsigned size);
      n = size;
      used = new[n];
      val  = new[n];
      pri  = new[n];
      in_s = new[n];
      reset();
    endfunction

    function void reset();
      foreach (used[i]) begin used[i] = 0; val[i] = 0; pri[i] = 0; in_s[i] = 0; end
      wait_q.delete();
      c_v = 0;
      foreach (n_ok[i]) begin n_ok[i] = 0; n_fail[i] = 0; end
      n_switch = 0; n_keep = 0; n_another = 0; n_pool_full = 0;
      n_destroy_queued = 0; n_idle_choose = 0;
    endfunction

    function int size();
      return wait_q.size() + c_v;
    endfunction

    function void enqueue(ent_t e);
      int pos = wait_q.size();
      for (int i = wait_q.size() - 1; i >= 0; i--) if (wait_q[i].rank > e.rank) pos = i;
      wait_q.insert(pos, e);
    endfunction

    function int find(int unsigned x);
      for (int i = 0; i < wait_q.size(); i++) if (wait_q[i].id == x) return i;
      return -1;
    endfunction

    // Take element x out of the scheduler.
    function void take_out(int unsigned x);
      in_s[x] = 0;
      if (c_v && c.id == x) begin
        if (wait_q.size() > 0) c = wait_q.pop_front();
        else c_v = 0;
      end else wait_q.delete(find(x));
    endfunction

    // Apply method m. id is the element identifier (already range-checked),
    // v the client value, p the priority.
    function void call(method_id_e m, int unsigned id, int v, int p,
                       output bit ok, output int ret);
      ent_t t;
      ok = 0;
      ret = 0;
      case (m)
        M_CHOSEN: if (c_v) begin ok = 1; ret = val[c.id]; end
        M_CREATE: begin
          for (int i = n - 1; i >= 0; i--) if (!used[i]) begin ok = 1; ret = i; end
          if (ok) begin used[ret] = 1; val[ret] = v; pri[ret] = p; end
          else n_pool_full++;
        end
        M_DESTROY: if (used[id]) begin
          ok = 1;
          ret = val[id];
          if (in_s[id]) begin take_out(id); n_destroy_queued++; end
          used[id] = 0;
        end
        M_GET_ID: for (int i = n - 1; i >= 0; i--) if (used[i] && val[i] == v) begin ok = 1; ret = i; end
        M_SIZE: begin ok = 1; ret = size(); end
        M_INSERT: if (used[id] && !in_s[id]) begin
          ok = 1;
          ret = val[id];
          in_s[id] = 1;
          t.id = id;
          t.rank = longint'(pri[id]);
          if (!c_v) begin c_v = 1; c = t; end
          else enqueue(t);
        end
        M_REMOVE: if (used[id] && in_s[id]) begin
          ok = 1;
          ret = val[id];
          take_out(id);
        end
        M_REMOVE_HEAD: if (c_v) begin
          ok = 1;
          ret = val[c.id];
          take_out(c.id);
        end
        M_CHOOSE, M_CHOOSE_ANOTHER: if (c_v) begin
          ok = 1;
          if (wait_q.size() > 0 && (m == M_CHOOSE_ANOTHER || wait_q[0].rank <= c.rank)) begin
            t = c;
            c = wait_q.pop_front();
            enqueue(t);
            if (m == M_CHOOSE) n_switch++; else n_another++;
          end else if (wait_q.size() > 0) n_keep++;
          else n_idle_choose++;
          ret = val[c.id];
        end
        M_CHOOSE_ELEM: if (used[id] && in_s[id]) begin
          ok = 1;
          ret = val[id];
          if (c.id != id) begin
            t = wait_q[find(id)];
            wait_q.delete(find(id));
            enqueue(c);
            c = t;
          end
        end
        default: ;
      endcase
      if (ok) n_ok[m]++; else n_fail[m]++;
    endfunction
  endclass
endpackage
