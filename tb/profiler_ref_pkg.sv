// profiler_ref_pkg: behavioural reference model of the loop table, used by
// the testbenches to predict what the profiler must hold.
//
// It keeps the same fields as the hardware with plain integers and applies
// the profiling rules directly: a known loop start increments the count and
// takes the new interval as minimum when it is the same or less; an unknown
// one takes the first free slot, else the slot of lowest weight
// (count x minimum time, 0 while unmeasured; lowest index on a tie). Counts
// saturate at 2^32-1 and intervals at 2^16-1, as in the hardware.
package profiler_ref_pkg;

  class loop_ref;
    int          n;
    bit          valid    [];
    bit          measured [];
    int unsigned start    [];
    int unsigned size     [];
    longint      count    [];
    longint      min_time [];
    longint      last_ts  [];
    // what the last call did
    bit          did_update, did_alloc, did_replace, did_newmin;

    function new(int n_loops);
      n = n_loops;
      valid = new[n]; measured = new[n]; start = new[n]; size = new[n];
      count = new[n]; min_time = new[n]; last_ts = new[n];
      clear();
    endfunction

    function void clear();
      for (int i = 0; i < n; i++) begin
        valid[i] = 0; measured[i] = 0; start[i] = 0; size[i] = 0;
        count[i] = 0; min_time[i] = 0; last_ts[i] = 0;
      end
    endfunction

    function longint weight(int i);
      if (!valid[i] || !measured[i]) return 0;
      return count[i] * min_time[i];
    endfunction

    function int victim();
      int     vi;
      longint vw;
      longint wi;
      for (int i = 0; i < n; i++)
        if (!valid[i]) return i;
      vi = 0;
      vw = weight(0);
      for (int i = 1; i < n; i++) begin
        wi = weight(i);
        if (wi < vw) begin
          vi = i;
          vw = wi;
        end
      end
      return vi;
    endfunction

    function longint threshold();
      return weight(victim());
    endfunction

    // returns -1 when no entry has a non-zero weight
    function int best();
      int     bi;
      longint bw;
      longint wi;
      bi = -1;
      bw = 0;
      for (int i = 0; i < n; i++) begin
        wi = weight(i);
        if (wi > bw) begin
          bi = i;
          bw = wi;
        end
      end
      return bi;
    endfunction

    function void hit(int unsigned tgt, int unsigned sz, longint now);
      int     m;
      longint dt;
      did_update = 0; did_alloc = 0; did_replace = 0; did_newmin = 0;
      m = -1;
      for (int i = 0; i < n; i++)
        if (m < 0 && valid[i] && start[i] == tgt) m = i;
      if (m >= 0) begin
        did_update = 1;
        if (count[m] < 64'hFFFF_FFFF) count[m]++;
        dt = now - last_ts[m];
        if (dt > 65535) dt = 65535;
        if (!measured[m] || dt <= min_time[m]) begin
          min_time[m] = dt;
          measured[m] = 1;
          did_newmin = 1;
        end
        last_ts[m] = now;
      end else begin
        m = victim();
        did_alloc   = !valid[m];
        did_replace = valid[m];
        valid[m] = 1; measured[m] = 0; start[m] = tgt; size[m] = sz;
        count[m] = 1; min_time[m] = 0; last_ts[m] = now;
      end
    endfunction
  endclass

endpackage
