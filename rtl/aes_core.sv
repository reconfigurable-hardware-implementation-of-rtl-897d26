// aes_core: round controller and state register of the iterative AES-128
// engine.
//
// A block is accepted when in_valid && in_ready (in_ready is high only when
// idle and keys_ok). In that cycle the initial AddRoundKey is applied
// (round key 0 for encryption, round key NR for decryption) and the result is
// registered. Each of the next NR cycles runs one round through
// round_datapath, the last without (Inv)MixColumns. Round r uses round key r
// when encrypting and NR-r when decrypting; rk_idx tells the key store which
// one to present on rk in the same cycle. After round NR, out_valid is raised
// and out_data/out_decrypt are held until out_ready. Latency: out_valid goes
// high NR clock edges after the accepting edge; a new block is accepted on the
// cycle after the result is taken. The iterative one-round-per-clock schedule
// and the handshakes are this design's choices.
//
// NR_P (default 10, the AES-128 round count) only sizes the round count and
// the schedule; the 4-word key recurrence is that of AES-128, so other values
// do not give AES-192 or AES-256.
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = NR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       keys_ok,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_decrypt,
  input  state_t     in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_decrypt,
  output state_t     out_data,
  output logic       busy,
  output logic [3:0] rk_idx,
  input  state_t     rk
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} core_state_e;

  core_state_e st;
  logic [3:0]  round;
  logic        dec;
  state_t      state, round_out;

  assign in_ready  = (st == S_IDLE) && keys_ok;
  assign out_valid = (st == S_DONE);
  assign out_data  = state;
  assign out_decrypt = dec;
  assign busy      = (st != S_IDLE);

  always_comb begin
    if (st == S_IDLE) rk_idx = in_decrypt ? 4'(NR_P) : 4'd0;
    else              rk_idx = dec ? 4'(NR_P) - round : round;
  end

  round_datapath u_round (
    .s_in     (state),
    .round_key(rk),
    .inv      (dec),
    .last     (round == 4'(NR_P)),
    .s_out    (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      round <= 4'd0;
      dec   <= 1'b0;
      state <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid && in_ready) begin
          state <= in_data ^ rk;      // initial AddRoundKey
          dec   <= in_decrypt;
          round <= 4'd1;
          st    <= S_RUN;
        end
        S_RUN: begin
          state <= round_out;
          if (round == 4'(NR_P)) st <= S_DONE;
          else                   round <= round + 4'd1;
        end
        S_DONE: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // a result stays on the outputs until it is taken
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_out_hold: assert property (p_out_hold);

endmodule
