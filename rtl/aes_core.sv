// aes_core: the processing element of every mesh node, an iterative AES-128
// encryption unit (128-bit key, 128-bit block, 10 rounds).
//
// A one-cycle `ld` captures key and text_in and performs the initial
// AddRoundKey.  Each following clock edge runs one full round (SubBytes,
// ShiftRows, MixColumns except in the last round, AddRoundKey), deriving the
// round key on the fly from the previous one, so no key schedule is stored.
// Timing: `done` rises on the 10th rising edge after the one that sampled
// `ld` and stays high until the next `ld`; `busy` is high in between.
// f_out is the state register itself, so it shows the intermediate round
// states while busy and holds the ciphertext while done is high.  An `ld`
// while busy restarts the unit with the new operands.
//
// The algorithm, the sizes and the ten iterations come from AES itself; one
// round per clock, on-the-fly key expansion, the computed S-box and the
// ld/busy/done protocol are choices of this design.
module aes_core
  import aes_pkg::*;
#(
  parameter int ROUNDS = 10
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] f_out,
  output logic         done,
  output logic         busy
);

  logic [127:0] state_q, rkey_q, rkey_next, round_out;
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;          // round about to be executed, 1..ROUNDS
  logic         last_round;

  assign last_round = (round_q == 4'(ROUNDS));
  assign rkey_next  = next_round_key(rkey_q, rcon_q);

  always_comb begin
    logic [127:0] t;
    t = shift_rows(sub_bytes(state_q));
    if (!last_round) t = mix_columns(t);
    round_out = t ^ rkey_next;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= '0;
      rkey_q  <= '0;
      rcon_q  <= 8'h01;
      round_q <= 4'd1;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else if (ld) begin
      state_q <= text_in ^ key;
      rkey_q  <= key;
      rcon_q  <= 8'h01;
      round_q <= 4'd1;
      busy    <= 1'b1;
      done    <= 1'b0;
    end else if (busy) begin
      state_q <= round_out;
      rkey_q  <= rkey_next;
      rcon_q  <= xtime(rcon_q);
      round_q <= round_q + 4'd1;
      if (last_round) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign f_out = state_q;

  assert property (@(posedge clk) disable iff (rst) !(busy && done));

endmodule
