// key_expansion: AES-128 key schedule, 44 32-bit words w[0..43].
//
// On start (one cycle) the key is copied into w[0..3] (key byte 0 is the top
// byte of w[0]). In each of the next NR cycles one group of four words is
// formed from the previous group:
//   w[4i]   = w[4i-4] ^ g(w[4i-1], i)      g = SubWord(RotWord(.)) ^ Rcon(i)
//   w[4i+j] = w[4i+j-4] ^ w[4i+j-1]        j = 1..3
// SubWord uses four combinational S-boxes (sbox_comb). The words are held in a
// register array; round key r (w[4r..4r+3], 128 bits) is read combinationally
// through rk_idx/rk. busy is high while groups are being produced; done rises
// NR cycles after start and stays high until the next start. A start while
// busy is ignored. The group-per-cycle schedule and register storage are this
// design's choices; the recurrence and g follow the AES key expansion.
//
// NR_P (default 10, the AES-128 round count) only sizes the round count and
// the schedule; the 4-word key recurrence is that of AES-128, so other values
// do not give AES-192 or AES-256.
module key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = NR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  state_t      key,
  output logic        busy,
  output logic        done,
  input  logic [3:0]  rk_idx,
  output state_t      rk
);

  localparam int unsigned NW = 4 * (NR_P + 1);

  word_t      w [NW];
  logic [3:0] grp;         // group being produced, 1..NR_P
  word_t      prev [4];    // previous group w[4i-4..4i-1]
  word_t      nxt  [4];    // new group w[4i..4i+3]
  word_t      rot, sub;

  always_comb begin
    for (int j = 0; j < 4; j++) prev[j] = w[4*grp - 4 + j];
  end

  assign rot = {prev[3][23:0], prev[3][31:24]};

  for (genvar k = 0; k < 4; k++) begin : g_subword
    sbox_comb u_sbox (.x(rot[31-8*k -: 8]), .inv(1'b0), .y(sub[31-8*k -: 8]));
  end

  always_comb begin
    nxt[0] = prev[0] ^ sub ^ {rcon(grp), 24'h000000};
    for (int j = 1; j < 4; j++) nxt[j] = prev[j] ^ nxt[j-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      grp  <= 4'd1;
      for (int i = 0; i < NW; i++) w[i] <= '0;
    end else if (start && !busy) begin
      for (int j = 0; j < 4; j++) w[j] <= key[127-32*j -: 32];
      busy <= 1'b1;
      done <= 1'b0;
      grp  <= 4'd1;
    end else if (busy) begin
      for (int j = 0; j < 4; j++) w[4*grp + j] <= nxt[j];
      if (grp == 4'(NR_P)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        grp <= grp + 4'd1;
      end
    end
  end

  // indices above NR_P read the last round key
  logic [3:0] idx;
  assign idx = (rk_idx > 4'(NR_P)) ? 4'(NR_P) : rk_idx;
  assign rk  = {w[4*idx], w[4*idx+1], w[4*idx+2], w[4*idx+3]};

endmodule
