// Reference model shared by the IDCT testbenches, included inside a module:
// random coefficient blocks shaped like dequantised JPEG data, and a
// floating-point 8x8 IDCT with the JPEG level shift and clamp.

  typedef int blk_t [64];
  typedef blk_t tb_blk_q_t [$];

  // DC over the full 12-bit range, a few non-zero low-frequency ACs,
  // sometimes a dense block.
  function automatic blk_t gen_block(input int kind);
    blk_t f;
    for (int i = 0; i < 64; i++) f[i] = 0;
    f[0] = $urandom_range(0, 4095) - 2048;
    if (kind == 0) begin
      for (int n = 0; n < 6; n++) f[$urandom_range(1, 20)] = $urandom_range(0, 400) - 200;
    end else if (kind == 1) begin
      for (int i = 1; i < 64; i++) f[i] = $urandom_range(0, 4095) - 2048;
    end else begin
      for (int i = 1; i < 64; i++) f[i] = $urandom_range(0, 60) - 30;
    end
    return f;
  endfunction

  function automatic blk_t idct_ref(input blk_t f);
    blk_t p;
    real  pi, s, cu, cv;
    pi = 3.14159265358979;
    for (int y = 0; y < 8; y++) begin
      for (int x = 0; x < 8; x++) begin
        s = 0.0;
        for (int u = 0; u < 8; u++) begin
          for (int v = 0; v < 8; v++) begin
            cu = (u == 0) ? 0.70710678118 : 1.0;
            cv = (v == 0) ? 0.70710678118 : 1.0;
            s += cu * cv / 4.0 * real'(f[u*8+v]) * $cos((2*y+1)*u*pi/16.0) * $cos((2*x+1)*v*pi/16.0);
          end
        end
        s = s + 128.0;
        p[y*8+x] = (s < 0.0) ? 0 : (s > 255.0) ? 255 : int'($floor(s + 0.5));
      end
    end
    return p;
  endfunction

