// bf_cipher: Blowfish encryption / decryption unit (16 iterated rounds).
//
// One bf_round is used sixteen times. Encryption feeds it P0, P1, ..., P15 and
// then whitens the result with P16 and P17; decryption is the same hardware
// with the subkeys walked the other way (P17 ... P2, then P1 and P0), so a
// single datapath does both. After the sixteenth round the last swap is
// undone and the output is
//     block_out = { R16 ^ P17 , L16 ^ P16 }   (encrypt)
//     block_out = { R16 ^ P0  , L16 ^ P1  }   (decrypt)
// where L16/R16 are the halves leaving round 16.
//
// WDDL timing: the round's XORs are WDDL gates that must precharge before they
// evaluate. With WDDL = 1 every round takes two clock cycles, a precharge cycle
// (pre = 1, nothing is stored) and an evaluation cycle (pre = 0, L and R take
// the round's result). While idle the WDDL region stays precharged. With
// WDDL = 0 pre is held low and a round takes one cycle.
//
// Interface: start (accepted only while busy = 0) latches block_in and dir.
// done is a one-cycle pulse in which block_out is valid; block_out then holds
// until the next block finishes. Latency from the start cycle to the done
// cycle: 16 * (1 + WDDL) + 1 cycles (33 with WDDL). P-array and S-boxes must
// not change while busy. The S-box write port is passed through to the
// S-boxes inside F.
module bf_cipher
  import blowfish_pkg::*;
#(
  parameter bit WDDL = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  dir_e     dir,
  input  block_t   block_in,
  input  parray_t  p,
  input  sbox_wr_t sbox_wr,
  output logic     busy,
  output logic     done,
  output block_t   block_out,
  output logic     pre
);
  word_t      l_q, r_q, l_nx, r_nx, p_round;
  logic [3:0] rnd_q;
  logic       pre_q;
  dir_e       dir_q;
  logic       rail_ok;

  // The WDDL region is precharged while idle and in the first cycle of a round.
  assign pre = WDDL ? (pre_q || !busy) : 1'b0;

  assign p_round = (dir_q == DIR_ENCRYPT) ? p[{1'b0, rnd_q}] : p[5'(P_WORDS - 1) - {1'b0, rnd_q}];

  bf_round u_round (
    .clk(clk), .pre(pre), .l_in(l_q), .r_in(r_q), .p_key(p_round),
    .sbox_wr(sbox_wr), .l_out(l_nx), .r_out(r_nx), .rail_ok(rail_ok)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      pre_q     <= 1'b1;
      rnd_q     <= '0;
      dir_q     <= DIR_ENCRYPT;
      l_q       <= '0;
      r_q       <= '0;
      block_out <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          dir_q <= dir;
          l_q   <= block_in[BLOCK_W-1 -: WORD_W];
          r_q   <= block_in[WORD_W-1:0];
          rnd_q <= '0;
          pre_q <= WDDL;
        end
      end else if (pre) begin
        pre_q <= 1'b0;                      // precharge over, evaluate next
      end else begin
        l_q   <= l_nx;
        r_q   <= r_nx;
        rnd_q <= rnd_q + 4'd1;
        pre_q <= WDDL;
        if (rnd_q == 4'(N_ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dir_q == DIR_ENCRYPT)
            block_out <= {r_nx ^ p[P_WORDS-1], l_nx ^ p[P_WORDS-2]};
          else
            block_out <= {r_nx ^ p[0], l_nx ^ p[1]};
        end
      end
    end
  end

  // The WDDL rails must be all-zero in precharge and complementary in evaluation.
  a_rails : assert property (@(posedge clk) disable iff (!rst_n) rail_ok)
    else $error("bf_cipher: WDDL rails not balanced");
  // done marks the end of a block, so it is never high while a block is in flight.
  a_done_idle : assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("bf_cipher: done raised while busy");
endmodule
