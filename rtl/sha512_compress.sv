// sha512_compress -- SHA-512 compression function F for one 1024-bit block.
//
// On start the working variables a..h are loaded from h_in (the current hash
// value H_{i-1}); then the 80 rounds run, three clock cycles each, and at the
// end sum = h_in + (a..h) word by word mod 2^64, i.e. the next hash value H_i.
// The round is split over three cycles to keep the logic between registers
// short (the design trades latency for area and clock rate):
//   OPS   latch Kt from the constant ROM and W_t from the schedule, and the
//         operands of the choose function (Cx,Cy,Cz <= e,f,g) and of the
//         majority function (Mx,My <= a,b)
//   TCALC T1 <= h + Sigma1(e) + Ch(Cx,Cy,Cz) + Kt + W_t
//         T2 <= Sigma0(a) + Maj(Mx,My,c)
//   UPD   h<=g g<=f f<=e e<=d+T1 d<=c c<=b b<=a a<=T1+T2
// The register names a..h, T1, T2, Kt, Cx, Cy, Cz, Mx, My are those of the
// reference simulation of the core; the three-cycle split is this design's
// reading of them. Once a block is finished, Cx/Cy/Cz equal the final f/g/h
// and Mx/My the final b/c, which matches that simulation.
//
// Timing, per block: 1 FETCH cycle, 80 x 3 round cycles, 1 DONE cycle; done
// pulses for one cycle in DONE, when sum is valid. The message word for round
// t is requested with w_req / w_idx one cycle before the OPS cycle that takes
// it (w_take), which suits a buffer with a registered read.
module sha512_compress
  import sha512_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  state_t     h_in,
  // message schedule
  output logic       w_req,     // a schedule word for round w_idx is needed next cycle
  output logic [6:0] w_idx,
  output logic       w_take,    // schedule word of round t is taken this cycle
  output logic [6:0] t,         // current round
  input  word_t      w_t,
  // result
  output logic       busy,
  output logic       done,
  output state_t     sum
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_OPS, S_TCALC, S_UPD, S_DONE} cstate_e;
  cstate_e st;

  word_t a, b, c, d, e, f, g, h;
  word_t T1, T2, Kt, Wt, Cx, Cy, Cz, Mx, My;
  word_t k_rom;

  sha512_k_rom u_k (.addr(t), .k(k_rom));

  always_ff @(posedge clk) begin
    if (reset) begin
      st <= S_IDLE;
      t  <= '0;
      {a, b, c, d, e, f, g, h} <= '0;
      {T1, T2, Kt, Wt, Cx, Cy, Cz, Mx, My} <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          {a, b, c, d} <= {h_in[0], h_in[1], h_in[2], h_in[3]};
          {e, f, g, h} <= {h_in[4], h_in[5], h_in[6], h_in[7]};
          t  <= '0;
          st <= S_FETCH;
        end
        S_FETCH: st <= S_OPS;
        S_OPS: begin
          Kt <= k_rom;
          Wt <= w_t;
          Cx <= e;  Cy <= f;  Cz <= g;
          Mx <= a;  My <= b;
          st <= S_TCALC;
        end
        S_TCALC: begin
          T1 <= h + big_sigma1(e) + ch(Cx, Cy, Cz) + Kt + Wt;
          T2 <= big_sigma0(a) + maj(Mx, My, c);
          st <= S_UPD;
        end
        S_UPD: begin
          h <= g;  g <= f;  f <= e;  e <= d + T1;
          d <= c;  c <= b;  b <= a;  a <= T1 + T2;
          if (t == 7'(ROUNDS - 1)) st <= S_DONE;
          else begin
            t  <= t + 7'd1;
            st <= S_OPS;
          end
        end
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    w_req  = (st == S_IDLE && start) || (st == S_UPD && t != 7'(ROUNDS - 1));
    w_idx  = (st == S_UPD) ? t + 7'd1 : 7'd0;
    w_take = (st == S_OPS);
    busy   = (st != S_IDLE);
    done   = (st == S_DONE);
    sum[0] = h_in[0] + a;  sum[1] = h_in[1] + b;
    sum[2] = h_in[2] + c;  sum[3] = h_in[3] + d;
    sum[4] = h_in[4] + e;  sum[5] = h_in[5] + f;
    sum[6] = h_in[6] + g;  sum[7] = h_in[7] + h;
  end

endmodule
