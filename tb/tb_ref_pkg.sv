// tb_ref_pkg: reference functions shared by the testbenches.
//
// These compute the expected results directly from the text (plain string
// comparisons and an edit-distance table), independently of the NFA circuits
// under test.
package tb_ref_pkg;

  typedef byte unsigned bytes_t [$];

  function automatic byte unsigned lc(byte unsigned c);
    return (c >= "A" && c <= "Z") ? (c | 8'h20) : c;
  endfunction

  function automatic bit is_ws(byte unsigned c);
    return c == " " || c == 8'h09 || c == 8'h0d || c == 8'h0a;
  endfunction

  // Convert a string to a byte queue.
  function automatic bytes_t to_bytes(string s);
    bytes_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

  // Does pattern `p` occur in `t` starting at index `s`?
  function automatic bit occurs_at(bytes_t t, string p, int s, bit nocase = 0);
    if (s < 0 || s + p.len() > t.size()) return 0;
    for (int j = 0; j < p.len(); j++) begin
      if (nocase) begin
        if (lc(t[s+j]) != lc(p[j])) return 0;
      end else if (t[s+j] != p[j]) return 0;
    end
    return 1;
  endfunction

  // Does pattern `p` end at index `e` of `t`?
  function automatic bit ends_at(bytes_t t, string p, int e, bit nocase = 0);
    return occurs_at(t, p, e - p.len() + 1, nocase);
  endfunction

  // Does `p` occur anywhere in `t`?
  function automatic bit contains(bytes_t t, string p, bit nocase = 0);
    for (int s = 0; s + p.len() <= t.size(); s++)
      if (occurs_at(t, p, s, nocase)) return 1;
    return 0;
  endfunction

  // Smallest edit distance between `p` and any substring of t[0..e] that
  // ends at e (substitutions, insertions and deletions cost 1 each).
  function automatic int approx_at(bytes_t t, string p, int e);
    int m = p.len();
    int d [] = new[m + 1];
    int n [] = new[m + 1];
    for (int j = 0; j <= m; j++) d[j] = j;
    for (int i = 0; i <= e; i++) begin
      n[0] = 0;
      for (int j = 1; j <= m; j++) begin
        automatic int best = d[j-1] + ((t[i] == p[j-1]) ? 0 : 1);
        if (d[j] + 1 < best)   best = d[j] + 1;
        if (n[j-1] + 1 < best) best = n[j-1] + 1;
        n[j] = best;
      end
      d = n;
    end
    return d[m];
  endfunction

  // Does a request method name (GET, POST, HEAD) end at index e?
  function automatic bit method_end(bytes_t t, int e);
    return ends_at(t, "GET", e) || ends_at(t, "POST", e) || ends_at(t, "HEAD", e);
  endfunction

  // Protocol analysis: is character p of t inside a request argument, i.e.
  // not whitespace, its word preceded by whitespace that directly follows a
  // method name, and no method name ending earlier inside the word?
  function automatic bit exp_en(bytes_t t, int p);
    int a, e;
    if (is_ws(t[p])) return 0;
    a = p;
    while (a > 0 && !is_ws(t[a-1])) a--;
    for (int q = a; q < p; q++) if (method_end(t, q)) return 0;
    e = a - 1;
    if (e < 0 || !is_ws(t[e])) return 0;
    while (e >= 0 && is_ws(t[e])) e--;
    return e >= 0 && method_end(t, e);
  endfunction

  function automatic int arg_len(bytes_t t, int p);
    int a = p;
    while (a > 0 && !is_ws(t[a-1])) a--;
    return p - a + 1;
  endfunction

  // Expected result record of one packet for the example rule set of the
  // matcher (rule bits in 7:0, fewest differences of the approximate rule in
  // 33:32 with a valid bit in 40).
  typedef logic [63:0] res_t;
  function automatic res_t hids_expected(bytes_t t);
    res_t r = '0;
    int best = 99;
    bit win = 0, rel = 0, uri = 0, ovf = 0;
    r[0] = contains(t, "abc") && contains(t, "cd");
    r[1] = contains(t, "abd");
    r[2] = contains(t, "stat ", 1);
    for (int s = 2; s <= 2 + (8 - 5); s++) win |= occurs_at(t, "snort", s);
    r[3] = win;
    for (int e = 0; e < t.size(); e++)
      if (ends_at(t, "USER", e))
        for (int g = 1; g <= 1 + (10 - 4); g++) rel |= occurs_at(t, "root", e + 1 + g);
    r[4] = rel;
    for (int p = 0; p < t.size(); p++) begin
      int d = approx_at(t, "abcd", p);
      if (d < best) best = d;
      if (exp_en(t, p)) begin
        if (ends_at(t, "/bin/sh", p) && exp_en(t, p - 6)) uri = 1;
        if (arg_len(t, p) > 16) ovf = 1;
      end
    end
    r[5] = best <= 2;
    r[6] = uri;
    r[7] = ovf;
    if (best <= 2) begin
      r[32 +: 2] = 2'(best);
      r[40] = 1'b1;
    end
    return r;
  endfunction

endpackage
