// caes_cipher_engine: half-duplex 128-bit round datapath of the C-AES
// coprocessor, shared by encryption and decryption.
//
// The state is kept in a transformed basis so that the field-conversion and
// affine matrices of SubBytes leave the round loop.  With delta' (d) the map
// from the m(x) polynomial basis into GF((2^4)^2):
//   encryption  R' = d*R,        round: R' <- MC'(Inv(SR(R')) + c'_A) + d*K
//   decryption  R' = d*A^-1*R,   round: R' <- IMC'(Inv(ISR(R') + c'_A) + d*K)
// where c'_A = d*A^-1*c_A and MC'/IMC' use the merged column matrices
// prm.mc[k] (d*C_ck*A*d^-1 for encryption, d*A^-1*C_dk*d^-1 for decryption)
// prepared by the parameter initialization engine.  Per byte the loop holds
// one ShiftRows, an XOR, the composite-field inverter, an XOR, the merged
// MixColumns and a final XOR.
//   Input converter:  enc d*(x + K0), dec d*A^-1*(x + K_Nr)  (ik input)
//   Output converter: enc (A*d^-1)*p + K_Nr, dec d^-1*p, where p is the
//   value after the second XOR in the last round.
// Timing: 'load' registers the converted input block; each 'step' registers
// one round; in the cycle of the last round dout holds the result
// (combinational) for the caller to register.  A block therefore takes Nr
// cycles and the next one may be loaded in the cycle dout is taken.
// The round key input rk must hold K(i) (enc) or K(Nr-i) (dec) during round
// i, and K(Nr) / K(0) during the last round.
module caes_cipher_engine
  import caes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  caes_params_t prm,
  input  logic         ende,   // 0 encrypt, 1 decrypt
  input  logic         load,   // register input converter output
  input  logic         step,   // register one round
  input  block_t       din,    // text block (after CBC pre-XOR)
  input  block_t       ik,     // initial (enc) / final (dec) round key
  input  block_t       rk,     // round key of the current round
  output block_t       dout    // last-round result, valid in the last round
);
  block_t text_reg;
  block_t sr, u, v, p, mcx, nxt, dk, conv_in, conv_out, xin;

  // Bytewise delta' * round key, used on both paths.
  for (genvar b = 0; b < 16; b++) begin : g_dk
    caes_matmul8 u_dk (.m(prm.d), .x(rk[8*b +: 8]), .y(dk[8*b +: 8]));
  end

  always_comb begin
    sr = ende ? inv_shift_rows(text_reg) : shift_rows(text_reg);
    u  = sr ^ (ende ? {16{prm.cap}} : '0);
  end

  for (genvar b = 0; b < 16; b++) begin : g_inv
    caes_gf_inv u_inv (.a(u[8*b +: 8]), .y(v[8*b +: 8]));
  end

  always_comb begin
    p = v ^ (ende ? dk : {16{prm.cap}});
    // Merged MixColumns': t_r = sum_j M_{(j-r) mod 4} * s_j per column.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        byte_t acc;
        acc = '0;
        for (int j = 0; j < 4; j++)
          acc ^= matvec(prm.mc[(j - r + 4) % 4], st_byte(p, j, c));
        mcx[127 - 8*(4*c + r) -: 8] = acc;
      end
    nxt = mcx ^ (ende ? '0 : dk);
  end

  // Input data converter.
  always_comb begin
    xin = din ^ ik;
    for (int b = 0; b < 16; b++)
      conv_in[8*b +: 8] = matvec(ende ? prm.dai : prm.d, xin[8*b +: 8]);
  end

  // Output data converter.
  always_comb begin
    for (int b = 0; b < 16; b++)
      conv_out[8*b +: 8] = matvec(ende ? prm.di : prm.adi, p[8*b +: 8]);
    dout = conv_out ^ (ende ? '0 : rk);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       text_reg <= '0;
    else if (load) text_reg <= conv_in;
    else if (step) text_reg <= nxt;
  end

  // load and step are exclusive in the controller's schedule.
  a_load_step: assert property (@(posedge clk) disable iff (rst) !(load && step));
endmodule
