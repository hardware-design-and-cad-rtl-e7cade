// hep_tb_pkg: instruction-level reference model of an HEP emulation module,
// used by the testbenches to predict every node bit-out.
//
// The model executes one instruction per processor per step, with the
// semantics of the instruction set, independently of the RTL's state
// machine: all processors read their node bit-in from the outputs of the
// previous step, read operands before the Input Data RAM is written, then
// write IDR (every instruction), LDR (LUTOP, ROMREF) and the output
// (all but NOP). It also builds random and directed instruction words.
package hep_tb_pkg;

  typedef logic [17:0] lw_t;
  typedef logic [37:0] rw_t;

  class hep_ref_model;
    int unsigned n;
    lw_t  lmem [][128];
    rw_t  rmem [][128];
    logic ldr  [][128];
    logic idr  [][128];
    logic out  [];
    // how often each instruction type ran
    int unsigned n_lutop, n_ramref, n_romref, n_nop, n_remote_in, n_state_read;

    function new(int unsigned n_proc);
      n    = n_proc;
      lmem = new[n];
      rmem = new[n];
      ldr  = new[n];
      idr  = new[n];
      out  = new[n];
      reset();
    endfunction

    // Data memories and outputs cleared, as after a processor reset
    function void reset();
      for (int p = 0; p < n; p++) begin
        out[p] = 1'b0;
        for (int a = 0; a < 128; a++) begin
          ldr[p][a] = 1'b0;
          idr[p][a] = 1'b0;
        end
      end
    endfunction

    function logic rd(int p, logic src, logic [6:0] a);
      return src ? idr[p][a] : ldr[p][a];
    endfunction

    // Execute step s on every processor
    function void step(logic [6:0] s);
      logic new_out [];
      logic bit_in  [];
      logic do_ldr  [];
      logic do_out  [];
      lw_t  lw;
      rw_t  rw;
      rw_t  w;
      int   node;
      logic [3:0] idx;
      logic res;
      new_out = new[n];
      bit_in  = new[n];
      do_ldr  = new[n];
      do_out  = new[n];
      for (int p = 0; p < n; p++) begin
        lw   = lmem[p][s];
        rw   = rmem[p][s];
        node = int'(rw[37:32]);
        res  = 1'b0;
        bit_in[p] = (node < int'(n)) ? out[node] : 1'b0;
        if (node != p && node < int'(n)) n_remote_in++;
        case (lw[17:16])
          2'b01: begin
            for (int k = 0; k < 4; k++) begin
              idx[k] = rd(p, rw[28+k], rw[k*7 +: 7]);
              if (rw[k*7 +: 7] >= s) n_state_read++;
            end
            res = lw[idx];
            n_lutop++;
          end
          2'b11: begin
            res = rd(p, rw[28], rw[6:0]);
            if (rw[6:0] >= s) n_state_read++;
            n_ramref++;
          end
          2'b10: begin
            w   = rmem[p][lw[6:0]];
            res = w[lw[10:7]];
            n_romref++;
          end
          default: n_nop++;
        endcase
        new_out[p] = res;
        do_ldr[p]  = (lw[17:16] == 2'b01) || (lw[17:16] == 2'b10);
        do_out[p]  = (lw[17:16] != 2'b00);
      end
      for (int p = 0; p < n; p++) begin
        idr[p][s] = bit_in[p];
        if (do_ldr[p]) ldr[p][s] = new_out[p];
        if (do_out[p]) out[p]    = new_out[p];
      end
    endfunction

    function logic [63:0] out_vec();
      logic [63:0] v;
      v = '0;
      for (int p = 0; p < n; p++) v[p] = out[p];
      return v;
    endfunction

    // Random but valid program for all processors
    function void randomize_program(int unsigned n_nodes);
      for (int p = 0; p < n; p++)
        for (int s = 0; s < 128; s++) begin
          lmem[p][s] = 18'($urandom());
          rmem[p][s] = 38'({$urandom(), $urandom()});
          rmem[p][s][37:32] = 6'($urandom_range(n_nodes - 1));
        end
    endfunction
  endclass

  // Directed instruction encoders
  function automatic lw_t l_lutop(logic [15:0] tbl);
    return {2'b01, tbl};
  endfunction
  function automatic lw_t l_romref(logic [6:0] word_addr, logic [3:0] bit_addr);
    return {2'b10, 5'b0, bit_addr, word_addr};
  endfunction
  function automatic lw_t l_ramref();
    return {2'b11, 16'h0};
  endfunction
  function automatic lw_t l_nop();
    return 18'h0;
  endfunction
  // right word: node, sources {D,C,B,A}, operand addresses D, C, B, A
  function automatic rw_t r_word(logic [5:0] node, logic [3:0] src,
                                 logic [6:0] d, logic [6:0] c, logic [6:0] b, logic [6:0] a);
    return {node, src, d, c, b, a};
  endfunction

endpackage
