// tb_pkg: helpers shared by the testbenches - a reference HEC computed by
// polynomial long division (independent of the RTL's bit-serial CRC), and
// builders for test cells.
package tb_pkg;
  import atm_pkg::*;

  // Remainder of h(x) * x^8 divided by x^8 + x^2 + x + 1, XOR 0x55.
  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] v;
    v = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (v[i]) v[i -: 9] = v[i -: 9] ^ 9'h107;
    return v[7:0] ^ 8'h55;
  endfunction

  function automatic atm_cell_t make_cell(input logic [7:0] vpi, input logic [15:0] vci,
                                          input logic [31:0] tag, input bit good_hec = 1);
    atm_cell_t c;
    c.hdr.gfc = tag[3:0];
    c.hdr.vpi = vpi;
    c.hdr.vci = vci;
    c.hdr.pt  = tag[6:4];
    c.hdr.clp = tag[7];
    c.hdr.hec = ref_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pt, c.hdr.clp});
    if (!good_hec) c.hdr.hec = c.hdr.hec ^ 8'h01;
    for (int i = 0; i < PAYLOAD_BITS / 32; i++)
      c.payload[i*32 +: 32] = tag * 32'h9E3779B1 + 32'(i) * 32'h85EBCA6B;
    return c;
  endfunction

  // Q0.16 fraction of a probability, saturating below 1.
  function automatic logic [15:0] q16(input real x);
    real v;
    v = x * 65536.0;
    if (v < 0.0) v = 0.0;
    if (v > 65535.0) v = 65535.0;
    return 16'($rtoi(v + 0.5));
  endfunction

  // Mixture-of-geometric parameters of a period with mean m and squared
  // coefficient of variation c2:
  //   a = 0.5 (1 + sqrt(((c2-1)m + 1) / ((c2+1)m + 1)))
  //   p1 = (m - 2a)/m,  p2 = (m - 2(1-a))/m
  function automatic void mixture(input real m, input real c2,
                                  output logic [15:0] a, output logic [15:0] p1,
                                  output logic [15:0] p2);
    real al;
    al = 0.5 * (1.0 + $sqrt(((c2 - 1.0) * m + 1.0) / ((c2 + 1.0) * m + 1.0)));
    a  = q16(al);
    p1 = q16((m - 2.0 * al) / m);
    p2 = q16((m - 2.0 * (1.0 - al)) / m);
  endfunction

  function automatic traffic_cfg_t make_cfg(input real m_a, input real m_s, input real c2_a,
                                            input real c2_s, input int k_a,
                                            input logic [7:0] vpi, input logic [15:0] vci);
    traffic_cfg_t c;
    c.enable = 1'b1;
    mixture(m_a, c2_a, c.alpha_a, c.p1_a, c.p2_a);
    mixture(m_s, c2_s, c.alpha_s, c.p1_s, c.p2_s);
    c.k_a = 8'(k_a);
    c.vpi = vpi;
    c.vci = vci;
    return c;
  endfunction
endpackage
