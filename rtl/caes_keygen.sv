// caes_keygen: 3-in-1 on-the-fly round key generator (128/192/256-bit keys),
// one 128-bit round key per clock, forward for encryption and backward for
// decryption, with no round-key memory.
//
// Eight 32-bit registers LR0..LR7 hold a window of the expanded key,
// W[0..Nk-1] = w[4i .. 4i+Nk-1] for round i, so the round key K(i) is always
// W[0..3].  A step s (window s -> s+1) computes four new words
//   w[j] = w[j-Nk] ^ g(w[j-1]),  j = 4s+Nk+k, k = 0..3,
// and the window slides by four; a backward step (s+1 -> s) recovers the four
// older words as w[j-Nk] = w[j] ^ g(w[j-1]).  Four consecutive words need at
// most one SubWord, so a single f_k unit (RotWord mux, four S-boxes, Rcon
// XOR) is shared; its input is chosen so that it never depends on its own
// output (for 128-bit backward steps it is W2^W3).  Rcon(i) = x^(i-1) modulo
// the configured m(x).
//   Data source multiplexer: initial key (load_init), stored final window
//   (load_final) or the registers themselves (step).  'dir' selects the
//   forward or backward round function; 's' is the step index, supplied by
//   the key expansion controller.  cap_final copies the window into the
//   final-key register (the start window for decryption).
// Timing: the selected step is applied to the selected source and
// registered, so after load_init with s=0 the output is K(1).
module caes_keygen
  import caes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  keylen_e      keylen,
  input  caes_params_t prm,
  input  logic [255:0] init_key,   // w0 in bits 255..224
  input  logic         load_init,
  input  logic         load_final,
  input  logic         step,
  input  logic         dir,        // 0 forward, 1 backward
  input  logic [3:0]   s,          // index of the step being taken
  input  logic         cap_final,
  output block_t       rk,         // current round key, W[0..3]
  output block_t       final_rk    // first round key of the final window
);
  typedef enum logic [1:0] {G_NONE, G_ROT, G_SUB} gkind_e;

  word_t lr [8];
  word_t fin [8];
  word_t src [8];
  word_t nw [8];
  word_t nwin [8];
  word_t fk_in, fk_rot, fk_sub, fk_out;
  gkind_e gk;
  int unsigned ks, nk, ridx, si;
  byte_t rcon;

  always_comb begin
    for (int k = 0; k < 8; k++)
      src[k] = load_init  ? init_key[255 - 32*k -: 32] :
               load_final ? fin[k] : lr[k];
  end

  // Which word of the step passes through f_k, and how.
  always_comb begin
    nk   = nk_of(keylen);
    si   = 32'(s);
    ks   = 0;
    gk   = G_ROT;
    ridx = 1;
    case (keylen)
      KL192: begin
        case (si % 3)
          0: begin ks = 0; ridx = (4*si + 6) / 6; end
          1: begin ks = 2; ridx = (4*si + 8) / 6; end
          default: gk = G_NONE;
        endcase
      end
      KL256: begin
        ks = 0;
        if (s[0]) gk = G_SUB;
        else      ridx = si / 2 + 1;
      end
      default: ridx = si + 1;
    endcase
  end

  // Rcon = x^(ridx-1) mod m(x).
  always_comb begin
    rcon = 8'h01;
    for (int i = 2; i <= 14; i++)
      if (i <= ridx) rcon = xtime_m(rcon, prm.m);
  end

  // f_k input, chosen from the source window only (no loop through f_k).
  always_comb begin
    if (!dir) begin
      fk_in = src[nk-1];
      if (ks == 2) fk_in = src[0] ^ src[1] ^ src[nk-1];
    end else begin
      if (nk == 4) fk_in = src[2] ^ src[3];
      else         fk_in = src[nk - 5 + ks];
    end
    fk_rot = (gk == G_ROT) ? {fk_in[23:0], fk_in[31:24]} : fk_in;
  end

  for (genvar b = 0; b < 4; b++) begin : g_sub
    caes_sbox u_sb (.d(prm.d), .adi(prm.adi), .ca(prm.ca),
                    .x(fk_rot[8*b +: 8]), .y(fk_sub[8*b +: 8]));
  end

  assign fk_out = fk_sub ^ ((gk == G_ROT) ? {rcon, 24'h0} : 32'h0);

  // Round function: forward chain or backward chain, then the data shift.
  always_comb begin
    word_t prev;
    prev = '0;
    for (int k = 0; k < 8; k++) begin
      nw[k]   = '0;
      nwin[k] = '0;
    end
    if (!dir) begin
      prev = src[nk-1];
      for (int k = 0; k < 4; k++) begin
        nw[k] = src[k] ^ ((gk != G_NONE && k == ks) ? fk_out : prev);
        prev  = nw[k];
      end
      for (int k = 0; k < 8; k++)
        if (k < nk - 4) nwin[k] = src[k + 4];
        else if (k < nk) nwin[k] = nw[k - (nk - 4)];
    end else begin
      for (int k = 3; k >= 0; k--) begin
        if (nk == 4 && k == 0) prev = nw[3];
        else                   prev = src[nk - 5 + k];
        nw[k] = src[nk - 4 + k] ^ ((gk != G_NONE && k == ks) ? fk_out : prev);
      end
      for (int k = 0; k < 8; k++)
        if (k < 4) nwin[k] = nw[k];
        else if (k < nk) nwin[k] = src[k - 4];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < 8; k++) begin
        lr[k]  <= '0;
        fin[k] <= '0;
      end
    end else begin
      if (load_init || load_final || step)
        for (int k = 0; k < 8; k++) lr[k] <= nwin[k];
      if (cap_final)
        for (int k = 0; k < 8; k++) fin[k] <= lr[k];
    end
  end

  assign rk       = {lr[0], lr[1], lr[2], lr[3]};
  assign final_rk = {fin[0], fin[1], fin[2], fin[3]};

  a_one_source: assert property (@(posedge clk) disable iff (rst)
    $onehot0({load_init, load_final, step}));
endmodule
