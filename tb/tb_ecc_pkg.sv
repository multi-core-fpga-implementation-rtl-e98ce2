// tb_ecc_pkg - reference arithmetic for the testbenches: modular
// multiplication, exponentiation and inversion on plain wide integers, a
// round interpreter that executes ecc_pkg rounds on a model register file,
// and the NIST P-256 domain parameters used as test data.
package tb_ecc_pkg;
  import ecc_pkg::*;

  localparam int W = 528;
  typedef logic [W-1:0]       num_t;
  typedef logic [2*W+31:0]    wide_t;

  // NIST P-256 (FIPS 186) parameters.
  localparam num_t P256 = W'(256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff);
  localparam num_t A256 = W'(256'hffffffff00000001000000000000000000000000fffffffffffffffffffffffc);
  localparam num_t B256 = W'(256'h5ac635d8aa3a93e7b3ebbd55769886bc651d06b0cc53b0f63bce3c3e27d2604b);
  localparam num_t GX256 = W'(256'h6b17d1f2e12c4247f8bce6e563a440f277037d812deb33a0f4a13945d898c296);
  localparam num_t GY256 = W'(256'h4fe342e2fe1a7f9b8ee7eb4a7c0f9e162bce33576b315ececbb6406837bf51f5);
  localparam num_t N256 = W'(256'hffffffff00000000ffffffffffffffffbce6faada7179e84f3b9cac2fc632551);

  function automatic num_t mulmod(input num_t a, input num_t b, input num_t m);
    wide_t t;
    t = (wide_t'(a) * wide_t'(b)) % wide_t'(m);
    return num_t'(t);
  endfunction

  function automatic num_t addmod(input num_t a, input num_t b, input num_t m);
    wide_t t;
    t = (wide_t'(a) + wide_t'(b)) % wide_t'(m);
    return num_t'(t);
  endfunction

  function automatic num_t submod(input num_t a, input num_t b, input num_t m);
    wide_t t;
    t = (wide_t'(a) + wide_t'(m) - wide_t'(b) % wide_t'(m)) % wide_t'(m);
    return num_t'(t);
  endfunction

  function automatic num_t powmod(input num_t a, input num_t e, input num_t m);
    num_t r = 1;
    for (int i = W-1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, a, m);
    end
    return r;
  endfunction

  function automatic num_t invmod(input num_t a, input num_t m);
    return powmod(a, m - 2, m);
  endfunction

  // 2^W mod m and its inverse.
  function automatic num_t rmod(input num_t m);
    wide_t t;
    t = (wide_t'(1) << W) % wide_t'(m);
    return num_t'(t);
  endfunction

  // Model register file and a round interpreter.  mont = 1 gives MUL the
  // Montgomery meaning a*b*2^-W mod m, mont = 0 plain a*b mod m.
  num_t regs [NREG];
  num_t rinv_m = '0, rinv_v = '0;   // cached 2^-W mod m

  task automatic exec_round(input round_t r, input num_t m, input bit mont);
    num_t res [NCORES];
    num_t rinv;
    if (mont && rinv_m != m) begin
      rinv_v = invmod(rmod(m), m);
      rinv_m = m;
    end
    rinv = mont ? rinv_v : num_t'(1);
    for (int i = 0; i < NCORES; i++) begin
      unique case (r[i].op)
        OP_MUL: res[i] = mulmod(mulmod(regs[r[i].a], regs[r[i].b], m), rinv, m);
        OP_ADD: res[i] = addmod(regs[r[i].a], regs[r[i].b], m);
        OP_SUB: res[i] = submod(regs[r[i].a], regs[r[i].b], m);
        default: res[i] = '0;
      endcase
    end
    for (int i = 0; i < NCORES; i++)
      if (r[i].op != OP_NOP) regs[r[i].d] = res[i];
  endtask

  // Affine point arithmetic on y^2 = x^3 + a x + b (reference only).
  task automatic aff_add(input num_t x1, input num_t y1, input num_t x2, input num_t y2,
                         input num_t a, input num_t m, output num_t x3, output num_t y3);
    num_t l;
    if (x1 == x2 && y1 == y2)
      l = mulmod(addmod(mulmod(3, mulmod(x1, x1, m), m), a, m), invmod(addmod(y1, y1, m), m), m);
    else
      l = mulmod(submod(y2, y1, m), invmod(submod(x2, x1, m), m), m);
    x3 = submod(submod(mulmod(l, l, m), x1, m), x2, m);
    y3 = submod(mulmod(l, submod(x1, x3, m), m), y1, m);
  endtask

  // k*P by double-and-add (k >= 1), reference only.
  task automatic aff_smul(input num_t k, input num_t x, input num_t y, input num_t a,
                          input num_t m, output num_t xr, output num_t yr);
    bit have = 0;
    num_t qx = '0, qy = '0;
    for (int i = W-1; i >= 0; i--) begin
      if (have) aff_add(qx, qy, qx, qy, a, m, qx, qy);
      if (k[i]) begin
        if (have) aff_add(qx, qy, x, y, a, m, qx, qy);
        else begin qx = x; qy = y; have = 1; end
      end
    end
    xr = qx;
    yr = qy;
  endtask

endpackage
