// Test helpers for the Adaptive Encoding decoder: a reference encoder.
//
// encode() turns the difference between the pattern held by the decoder and
// the next pattern into the bit stream the decoder expects: packet count,
// difference-address width, data-length width, then one (difference address,
// length-1, data) triple per packet, every field MSB first. Runs of changed
// bits become packets; two runs separated by at most `merge_gap` unchanged
// bits are merged into one packet, so packets also carry zeros.
package ae_tb_pkg;

  function automatic int unsigned bits_for(int unsigned v);
    int unsigned b = 0;
    while ((v >> b) != 0) b++;
    return b;
  endfunction

  function automatic void push_field(ref bit q[$], input int unsigned v, input int unsigned w);
    for (int i = int'(w) - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  // Encode prev -> next. Returns the number of packets.
  function automatic int encode(input bit prev[], input bit next[], input int unsigned merge_gap,
                                input int unsigned npkt_w, input int unsigned hdr_w,
                                ref bit q[$]);
    int unsigned n = prev.size();
    int unsigned st[$], ln[$], da[$];
    int unsigned i, last_end, maxd, maxl, aw, lw;
    bit d[];
    d = new[n];
    for (i = 0; i < n; i++) d[i] = prev[i] ^ next[i];
    i = 0;
    while (i < n) begin
      if (d[i]) begin
        int unsigned s = i, e = i;   // e: last changed bit of the packet
        int unsigned j = i + 1;
        while (j < n) begin
          if (d[j]) begin e = j; j++; end
          else if (j - e <= merge_gap) j++;
          else break;
        end
        st.push_back(s); ln.push_back(e - s + 1);
        i = e + 1;
      end else i++;
    end
    last_end = 0; maxd = 0; maxl = 1;
    foreach (st[k]) begin
      da.push_back(st[k] - last_end);
      if (da[k] > maxd) maxd = da[k];
      if (ln[k] > maxl) maxl = ln[k];
      last_end = st[k] + ln[k];
    end
    aw = bits_for(maxd);
    lw = bits_for(maxl - 1);
    push_field(q, st.size(), npkt_w);
    push_field(q, aw, hdr_w);
    push_field(q, lw, hdr_w);
    foreach (st[k]) begin
      push_field(q, da[k], aw);
      push_field(q, ln[k] - 1, lw);
      for (int unsigned b = 0; b < ln[k]; b++) q.push_back(d[st[k] + b]);
    end
    return st.size();
  endfunction

endpackage
