// tb_lns_pkg: testbench helpers for the LNS word format and microwords.
// Conversions go through real arithmetic (log2 and 2^x), independent of the
// RTL's table look-up, so testbenches compare the hardware with a reference
// computed another way.
package tb_lns_pkg;
  import lns_pkg::*;

  function automatic lns_t to_lns(input real v);
    lns_t r;
    real  e;
    if (v == 0.0) return LNS_ZERO;
    r.zero = 1'b0;
    r.sign = (v < 0.0);
    e = $ln(v < 0.0 ? -v : v) / $ln(2.0) * 4096.0;
    r.exp = EXP_W'($rtoi(e < 0.0 ? e - 0.5 : e + 0.5));
    return r;
  endfunction

  function automatic real to_real(input lns_t x);
    real m;
    if (x.zero) return 0.0;
    m = $pow(2.0, real'(x.exp) / 4096.0);
    return x.sign ? -m : m;
  endfunction

  // Relative closeness with an absolute floor for values near zero.
  function automatic bit close(input real got, input real exp_v, input real rel);
    real d, a;
    d = got - exp_v; if (d < 0.0) d = -d;
    a = exp_v;       if (a < 0.0) a = -a;
    return d <= rel * a + 1e-3;
  endfunction

  function automatic logic [31:0] mw(input alu_op_t alu, input src_e mult_x, input src_e mult_y,
                                     input src_e square_x, input src_e add_x, input src_e add_y,
                                     input src_e top, input src_e right, input src_e mem,
                                     input logic wr, input logic [2:0] addr);
    ctrl_word_t c;
    c = '{unused: 1'b0, alu: alu, mult_x: mult_x, mult_y: mult_y, square_x: square_x,
          add_x: add_x, add_y: add_y, top: top, right: right, mem: mem, wr: wr, mem_addr: addr};
    return 32'(c);
  endfunction

  function automatic logic [31:0] word(input lns_t x);
    return {{(CW_W-WORD_W){1'b0}}, x};
  endfunction

endpackage
