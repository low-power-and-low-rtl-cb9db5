// Test helpers for the MDC decoder: a reference encoder and decoder model.
//
// Cubes are given slice by slice in load order (element 0 is the first bit
// loaded into the buffer, which ends up on the highest-numbered chain), with
// 0, 1 or 2 for a don't-care. encode() follows the coding rule of the scheme:
// at each step it tries a Copy at the current layer (all bits of the next
// group compatible with the group loaded last, or with the previous slice at
// layer 0), writes a 1 if it applies, else a 0 and tries the next layer; at
// the last layer it writes a 0 and the raw bits of one group, with
// don't-cares filled randomly. The values the decoder must produce are
// returned in `filled`.
package mdc_tb_pkg;

  function automatic int layer_of(input int c, input int gs[]);
    int r = 0;
    for (int i = gs.size() - 1; i >= 0; i--) if (c % gs[i] == 0) r = i;
    return r;
  endfunction

  // cube: nslices*A values in load order. prev: previous slice (A values,
  // load order). Appends to q; returns the filled pattern in `filled`.
  function automatic void encode(input int cube[], input int a, input int gs[],
                                 ref bit prev[], ref bit q[$], ref bit filled[],
                                 ref int copies[]);
    int ns = cube.size() / a;
    int nl = gs.size();
    filled = new[cube.size()];
    for (int s = 0; s < ns; s++) begin
      int c = 0;
      bit cur[];
      cur = new[a];
      while (c < a) begin
        int lv = layer_of(c, gs);
        bit done = 0;
        while (!done) begin
          int g = gs[lv];
          bit ok = 1;
          for (int i = 0; i < g; i++) begin
            int t = cube[s * a + c + i];
            bit src = (c == 0) ? prev[a - g + i] : cur[c - g + i];
            if (t != 2 && bit'(t) != src) ok = 0;
          end
          if (ok) begin
            q.push_back(1'b1);
            for (int i = 0; i < g; i++) cur[c + i] = (c == 0) ? prev[a - g + i] : cur[c - g + i];
            copies[lv]++;
            c += g;
            done = 1;
          end else begin
            q.push_back(1'b0);
            if (lv == nl - 1) begin
              for (int i = 0; i < g; i++) begin
                int t = cube[s * a + c + i];
                cur[c + i] = (t == 2) ? 1'($urandom_range(1)) : bit'(t);
                q.push_back(cur[c + i]);
              end
              c += g;
              done = 1;
            end else lv++;
          end
        end
      end
      for (int i = 0; i < a; i++) begin
        filled[s * a + i] = cur[i];
        prev[i] = cur[i];
      end
    end
  endfunction

endpackage
