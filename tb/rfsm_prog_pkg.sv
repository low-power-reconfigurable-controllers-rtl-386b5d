// rfsm_prog_pkg: testbench helper that maps an FSM onto the reconfigurable
// FSM's LUT configuration.
//
// class rfsm_prog holds an FSM as two tables, next state ns_tab[s][x] and Moore
// output out_tab[s], and computes the configuration word of any LUT cluster
// from them, independently of the RTL:
//   next-state unit i, cluster k, LUT bit r: v = (r << D) | k,
//       x = v mod 2^NIN, s = v >> NIN, bit = ns_tab[s][x][i]
//   output unit l, cluster j, LUT bit r:     s = (r << DO) | j, bit = out_tab[s][l]
// It also evaluates the FSM directly (next_state, outputs) to serve as the
// reference model, and offers small builders for microtask programs:
//   accumulate : r1 <= din; r0 <= r0 + r1; on carry r2 <= r2 + 1; repeat
//                while ext_in[0]; then done with r0 on dout.
//                4 cycles per sample, 5 when the addition carries.
//   triple     : r1 <= din; r0 <= r0 + r1 three times; done.  5 cycles.
//   signal     : ext lines 1, 2, 4 in three states, waits in the third for
//                ext_in[1], then done with ext lines 8.
package rfsm_prog_pkg;
  import rwsn_pkg::*;

  class rfsm_prog #(
    int unsigned N   = 7,
    int unsigned NIN = 4,
    int unsigned M   = 23,
    int unsigned K   = 6,
    int unsigned KOP = 6
  );
    localparam int unsigned D    = NIN + N - K;
    localparam int unsigned DO   = (N > KOP) ? N - KOP : 0;
    localparam int unsigned KO   = N - DO;
    localparam int unsigned NSL  = N << D;
    localparam int unsigned NLUT = (N << D) + (M << DO);

    logic [N-1:0] ns_tab  [1 << N][1 << NIN];
    logic [M-1:0] out_tab [1 << N];

    function new();
      clear();
    endfunction

    function void clear();
      for (int s = 0; s < (1 << N); s++) begin
        out_tab[s] = '0;
        for (int x = 0; x < (1 << NIN); x++) ns_tab[s][x] = N'(s);
      end
    endfunction

    // random FSM over all states and inputs
    function void fill_random();
      for (int s = 0; s < (1 << N); s++) begin
        for (int w = 0; w < M; w += 32)
          for (int b = 0; b < 32 && w + b < M; b++) out_tab[s][w+b] = $urandom_range(0, 1) == 1;
        for (int x = 0; x < (1 << NIN); x++) ns_tab[s][x] = N'($urandom);
      end
    endfunction

    // unconditional transition
    function void go(int s, int t);
      for (int x = 0; x < (1 << NIN); x++) ns_tab[s][x] = N'(t);
    endfunction

    // transition on one input bit
    function void branch(int s, int bit_idx, int t1, int t0);
      for (int x = 0; x < (1 << NIN); x++) ns_tab[s][x] = x[bit_idx] ? N'(t1) : N'(t0);
    endfunction

    function void set_out(int s, logic [M-1:0] y);
      out_tab[s] = y;
    endfunction

    function logic [N-1:0] next_state(logic [N-1:0] s, logic [NIN-1:0] x);
      return ns_tab[s][x];
    endfunction

    function logic [M-1:0] outputs(logic [N-1:0] s);
      return out_tab[s];
    endfunction

    function logic [(1<<K)-1:0] word(int a);
      logic [(1<<K)-1:0] w;
      int v, s, x, i, k, l, j;
      w = '0;
      if (a < int'(NSL)) begin
        i = a >> D;
        k = a & ((1 << D) - 1);
        for (int r = 0; r < (1 << K); r++) begin
          v = (r << D) | k;
          x = v & ((1 << NIN) - 1);
          s = v >> NIN;
          w[r] = ns_tab[s][x][i];
        end
      end else if (a < int'(NLUT)) begin
        l = (a - NSL) >> DO;
        j = (a - NSL) & ((1 << DO) - 1);
        for (int r = 0; r < (1 << KO); r++) begin
          s = (r << DO) | j;
          w[r] = out_tab[s][l];
        end
      end
      return w;
    endfunction
  endclass

  // state codes of the programs, spread over the 7 state bits
  localparam int unsigned S_A0 = 0, S_A1 = 37, S_A2 = 82, S_A3 = 101, S_A4 = 127, S_A5 = 64;

  function automatic logic [FSM_M-1:0] ctl(int ra = 0, int rb = 0, int rw = 0, bit we = 0,
                                           bit wsel = 0, bit cin = 0, int ext = 0, bit done = 0);
    mt_ctrl_t c;
    c.ra = RF_AW'(ra); c.rb = RF_AW'(rb); c.rw = RF_AW'(rw);
    c.we = we; c.wsel = wsel; c.cin = cin; c.ext = EXT_W'(ext); c.done = done;
    return FSM_M'(c);
  endfunction

  // carry flag is FSM input bit FSM_NIN-1, ext_in[j] is input bit j
  function automatic void build_accumulate(rfsm_prog p);
    p.clear();
    p.set_out(S_A0, ctl(.rw(1), .we(1), .wsel(1), .ext(1)));        p.go(S_A0, S_A1);
    p.set_out(S_A1, ctl(.ra(0), .rb(1), .rw(0), .we(1)));           p.go(S_A1, S_A2);
    p.set_out(S_A2, ctl(.ext(2)));                                  p.branch(S_A2, FSM_NIN-1, S_A3, S_A4);
    p.set_out(S_A3, ctl(.ra(2), .rb(14), .rw(2), .we(1), .cin(1))); p.go(S_A3, S_A4);
    p.set_out(S_A4, ctl());                                         p.branch(S_A4, 0, S_A0, S_A5);
    p.set_out(S_A5, ctl(.ra(0), .ext(7'h55), .done(1)));            p.go(S_A5, S_A5);
  endfunction

  function automatic void build_triple(rfsm_prog p);
    p.clear();
    p.set_out(0,  ctl(.rw(1), .we(1), .wsel(1)));            p.go(0, 9);
    p.set_out(9,  ctl(.ra(0), .rb(1), .rw(0), .we(1)));      p.go(9, 18);
    p.set_out(18, ctl(.ra(0), .rb(1), .rw(0), .we(1)));      p.go(18, 44);
    p.set_out(44, ctl(.ra(0), .rb(1), .rw(0), .we(1)));      p.go(44, 99);
    p.set_out(99, ctl(.ra(0), .done(1)));                    p.go(99, 99);
  endfunction

  function automatic void build_signal(rfsm_prog p);
    p.clear();
    p.set_out(0,   ctl(.ext(1)));              p.go(0, 3);
    p.set_out(3,   ctl(.ext(2)));              p.go(3, 70);
    p.set_out(70,  ctl(.ext(4)));              p.branch(70, 1, 126, 70);
    p.set_out(126, ctl(.ext(8), .done(1)));    p.go(126, 126);
  endfunction

endpackage
