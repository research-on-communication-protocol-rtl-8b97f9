// cowb_tb_pkg: reference functions for the COWB testbenches.
//
// ref_crc computes the frame check bit by bit (CRC-32, reflected polynomial
// 0xEDB88320, preset all ones, inverted result), written independently of
// the byte-step function the RTL uses. build_frame lays out a whole frame
// (DA, SA, TYPE, LENGTH most significant byte first, data, check).
package cowb_tb_pkg;

  typedef byte unsigned bq_t[$];

  function automatic logic [31:0] ref_crc(bq_t q);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (q[k])
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = c[0] ^ q[k][b];
        c  = {1'b0, c[31:1]};
        if (fb) c = c ^ 32'hEDB8_8320;
      end
    return ~c;
  endfunction

  function automatic bq_t build_frame(logic [15:0] da, logic [15:0] sa,
                                      logic [7:0] t, bq_t d);
    bq_t f;
    logic [31:0] c;
    logic [15:0] n;
    n = 16'(d.size());
    f = {da[15:8], da[7:0], sa[15:8], sa[7:0], t, n[15:8], n[7:0]};
    foreach (d[k]) f.push_back(d[k]);
    c = ref_crc(f);
    f.push_back(c[31:24]); f.push_back(c[23:16]);
    f.push_back(c[15:8]);  f.push_back(c[7:0]);
    return f;
  endfunction

  function automatic bq_t pattern(int n, int seed);
    bq_t q;
    for (int k = 0; k < n; k++) q.push_back(8'((k * 13 + seed * 5 + 1)));
    return q;
  endfunction

endpackage
