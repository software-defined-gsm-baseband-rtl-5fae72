// gsm_ref_pkg: reference models for the testbenches, written from the coding
// rules rather than from the RTL: polynomial division for the (53,50) cyclic
// code, the convolutional code as sums over the input history, the
// frame assembly and the interleaver's address map.
package gsm_ref_pkg;
  localparam int N_SPEECH = 260, N_IA = 50, N_IB = 132, N_II = 78;
  localparam int N_INFO = 189, N_CODED = 378, N_FRAME = 456;

  typedef logic [N_SPEECH-1:0] frame_t;     // bit i = i-th bit sent
  typedef logic [N_INFO-1:0]   info_t;
  typedef logic [N_FRAME-1:0]  coded_t;

  // Remainder of m(x) / (x^3 + x + 1), m's first bit the highest power;
  // result bit k = coefficient of x^k.
  function automatic logic [2:0] crc3(input logic [N_IA-1:0] m);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < N_IA; i++) begin
      r = {r[2:0], m[i]};
      if (r[3]) r = r ^ 4'b1011;
    end
    return r[2:0];
  endfunction

  function automatic info_t info_block(input frame_t f, input logic flip_parity);
    info_t u;
    logic [2:0] p;
    p = crc3(f[N_IA-1:0]) ^ {3{flip_parity}};
    u = '0;
    for (int i = 0; i < N_IA; i++) u[i] = f[i];
    for (int i = 0; i < 3; i++)    u[N_IA + i] = p[i];
    for (int i = 0; i < N_IB; i++) u[N_IA + 3 + i] = f[N_IA + i];
    return u;                                  // last 4 bits stay 0
  endfunction

  // c(2k) = u(k)+u(k-3)+u(k-4), c(2k+1) = u(k)+u(k-1)+u(k-3)+u(k-4)
  function automatic logic [N_CODED-1:0] conv(input info_t u);
    logic [N_CODED-1:0] c;
    for (int k = 0; k < N_INFO; k++) begin
      logic u0, u1, u3, u4;
      u0 = u[k];
      u1 = (k >= 1) ? u[k-1] : 1'b0;
      u3 = (k >= 3) ? u[k-3] : 1'b0;
      u4 = (k >= 4) ? u[k-4] : 1'b0;
      c[2*k]   = u0 ^ u3 ^ u4;
      c[2*k+1] = u0 ^ u1 ^ u3 ^ u4;
    end
    return c;
  endfunction

  function automatic coded_t encode(input frame_t f, input logic flip_parity = 1'b0);
    coded_t o;
    logic [N_CODED-1:0] c;
    c = conv(info_block(f, flip_parity));
    for (int i = 0; i < N_CODED; i++) o[i] = c[i];
    for (int i = 0; i < N_II; i++)    o[N_CODED + i] = f[N_IA + N_IB + i];
    return o;
  endfunction

  // Index of the coded bit sent at position p of burst b: block b on even,
  // block b+4 on odd positions; block r holds bits r, r+8, ...
  function automatic int il_index(input int b, input int p);
    return (b + 4 * (p % 2)) + 8 * (p / 2);
  endfunction

  // GSM training sequence code 0, symbol i.
  localparam logic [0:25] TSC = 26'b00100101110000100010010111;
endpackage
