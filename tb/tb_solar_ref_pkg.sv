// tb_solar_ref_pkg -- reference model of the SOLAR node functions and of one
// column's data transformation, for the testbenches.
//
// It is written from the function definitions (integer arithmetic, no bit
// slicing) rather than from the RTL structure:
//   ref_alu     value of each node function for operands a, b
//   ref_node    a node: input functions on the operands, then its function
//   ref_column  slots after one column has processed them: every enabled
//               node whose slots exist reads the incoming slots, then the
//               nodes write their results back to the slots they read; if
//               two nodes write one slot, the write that falls later in the
//               column's write window is the one that stays.
package tb_solar_ref_pkg;
  import solar_pkg::*;

  function automatic int ref_alu(func_e f, int a, int b);
    int e, p, d;
    case (f)
      FN_IDENT: return a;
      FN_HALF:  return a / 2;
      FN_ADD:   return a / 2 + b / 2;
      FN_SUB:   return (a / 2 > b / 2) ? a / 2 - b / 2 : 0;
      FN_LOG: begin
        if (a == 0) return 0;
        e = 0;
        while ((2 ** (e + 1)) <= a) e++;
        return 32 * e + ((a - 2 ** e) * 32) / (2 ** e);
      end
      FN_EXP: return ((32 + a % 32) * (2 ** (a / 32))) / 32;
      FN_SIGMOID: begin
        d = (a >= 128) ? a - 128 : 128 - a;
        if (d < 16)      p = 128 + 4 * d;
        else if (d < 38) p = 160 + 2 * d;
        else if (d < 80) p = 216 + d / 2;
        else             p = 256;
        p = (a >= 128) ? p : 256 - p;
        return (p > 255) ? 255 : p;
      end
      default: return a;
    endcase
  endfunction

  function automatic void put(ref int slots [], ref int wtime [], input int s, input int v,
                              input int p, input int pk, input int L);
    int t;
    t = L + pk + (((s + p - (L + pk)) % L) + L) % L;
    if (t > wtime[s]) begin
      wtime[s] = t;
      slots[s] = v;
    end
  endfunction

  // slots: in/out, L entries. cfg: K entries, node i at node_pos(i, L, K).
  // a node: input functions on both operands, then the node function;
  // only one-input codes act as input functions, any other is identity
  function automatic int ref_node(node_cfg_t c, int a, int b);
    int pa, pb;
    pa = (c.pre_a inside {FN_HALF, FN_LOG, FN_EXP, FN_SIGMOID}) ? ref_alu(c.pre_a, a, 0) : a;
    pb = (c.pre_b inside {FN_HALF, FN_LOG, FN_EXP, FN_SIGMOID}) ? ref_alu(c.pre_b, b, 0) : b;
    return ref_alu(c.func, pa, pb);
  endfunction

  function automatic void ref_column(ref int slots [], input node_cfg_t cfg [], input int L);
    int K;
    int res [];
    bit act [];
    int wtime [];
    K = cfg.size();
    res = new[K];
    act = new[K];
    for (int i = 0; i < K; i++) begin
      act[i] = cfg[i].en && (int'(cfg[i].slot_a) < L) &&
               (!is_binary(cfg[i].func) || int'(cfg[i].slot_b) < L);
      if (act[i])
        res[i] = ref_node(cfg[i], slots[cfg[i].slot_a],
                          is_binary(cfg[i].func) ? slots[cfg[i].slot_b] : 0);
    end
    // writes land in time order: node i writes slot s in the shift cycle of
    // the write window [L+Pk, 2L+Pk) that is congruent to s + P_i mod L
    wtime = new[L];
    foreach (wtime[s]) wtime[s] = -1;
    for (int i = 0; i < K; i++) begin
      if (act[i]) begin
        put(slots, wtime, int'(cfg[i].slot_a), res[i], node_pos(i, L, K), node_pos(K - 1, L, K), L);
        if (is_binary(cfg[i].func))
          put(slots, wtime, int'(cfg[i].slot_b), res[i], node_pos(i, L, K), node_pos(K - 1, L, K), L);
      end
    end
  endfunction

endpackage
