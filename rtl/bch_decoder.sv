// bch_decoder: serial BCH error decoder over GF(2^9).
//
// Takes the BCH syndrome polynomial s(x) = e(x) mod g(x) (NK = 144 bits,
// bit i = coefficient of x^i) and finds the error vector e of the shortened
// (N = 318, K = 174, T = 17) code in three steps, one field operation per
// loop iteration as in the reference algorithms:
//   1. syndrome evaluation  z_i = s(alpha^(i+1)), i = 0..2T-1, by Horner-free
//      power accumulation (2T * NK cycles);
//   2. inversionless Berlekamp-Massey, giving the error locator Lambda
//      (per iteration: min(i,T)+1 cycles for the discrepancy and T+1 cycles
//      for the update of Lambda and the auxiliary polynomial b);
//   3. Chien search. Lambda_j is first scaled by alpha^(j*(2^9-1-N)) (T
//      cycles) to skip the positions removed by shortening, then N points
//      are evaluated with T cycles each. The error bit of position N-1 is
//      produced first, position 0 last: `err_valid` pulses once per
//      position with `err_bit` set where Lambda has a root.
// `done` pulses after the last position; `nerr` counts the located errors.
// With T = 17 and N = 318 a decode takes 11391 cycles.
//
// The algorithms and their order follow the reference design. The
// reference runs them as firmware of a small 10-bit instruction-set
// coprocessor (address RAM, data RAM, GF(2^u) multiply-accumulate ALU);
// its instruction encoding and firmware are not given, so this block is a
// hardwired state machine that runs the same loops with two GF(2^9)
// multipliers and register arrays instead. It is therefore faster (about
// 11.4k instead of about 50k cycles) and larger than the coprocessor.
module bch_decoder
  import pufky_pkg::*;
#(
  parameter int unsigned N  = BCH_N,
  parameter int unsigned T  = BCH_T,
  parameter int unsigned NK = BCH_NK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NK-1:0] syn,
  output logic          busy,
  output logic          done,
  output logic          err_valid,
  output logic          err_bit,
  output logic [$clog2(N+1)-1:0] nerr
);

  localparam int unsigned SHORT = GF_Q1 - N;          // shortened positions
  localparam gf_t ALPHA   = gf_t'(2);
  localparam gf_t A_SHORT = gf_alpha_pow(SHORT);
  localparam int unsigned JW = $clog2(NK + T + 2);

  typedef enum logic [2:0] {
    D_IDLE, D_SYN, D_BMI, D_DELTA, D_UPD, D_PRE, D_CHIEN
  } dstate_t;

  dstate_t state;
  logic [NK-1:0]      s_q;
  gf_t                z   [2*T];
  gf_t                lam [T+1];
  gf_t                bb  [T+2];    // bb[j+1] = b[j]; bb[0] = b[-1] = 0
  gf_t                gam, delta, cur, ev, acc;
  logic signed [7:0]  k;
  logic               flag;
  logic [7:0]         i;
  logic [JW-1:0]      j;
  logic [$clog2(N+1)-1:0] c;

  // Array indices at the width of the arrays they address.
  localparam int unsigned ZW = $clog2(2 * T);
  localparam int unsigned LW = $clog2(T + 2);
  logic [ZW-1:0] zi, zd;
  logic [LW-1:0] jl;
  assign zi = ZW'(i);
  assign zd = ZW'(i - 8'(j));
  assign jl = LW'(j);

  // Operand selection for the two field multipliers.
  gf_t m1a, m1b, m2a, m2b, m1, m2;
  always_comb begin
    m1a = cur; m1b = ev; m2a = '0; m2b = '0;
    case (state)
      D_SYN:   begin m1a = ev;          m1b = cur;      end
      D_DELTA: begin m1a = z[zd];    m1b = lam[jl];   end
      D_UPD:   begin m1a = lam[jl];      m1b = gam;
                     m2a = bb[jl];       m2b = delta;    end
      D_PRE:   begin m1a = lam[jl];      m1b = cur;
                     m2a = cur;         m2b = A_SHORT;  end
      D_CHIEN: begin m1a = lam[jl];      m1b = cur;      end
      default: ;
    endcase
    m1 = gf_mul(m1a, m1b);
    m2 = gf_mul(m2a, m2b);
  end

  logic [7:0] jmax;
  assign jmax = (i < 8'(T)) ? i : 8'(T);

  gf_t acc_n, delta_n, ev_n;
  assign acc_n   = acc ^ (s_q[j] ? ev : '0);
  assign delta_n = delta ^ m1;
  assign ev_n    = ev ^ m1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      s_q <= '0; gam <= '0; delta <= '0; cur <= '0; ev <= '0; acc <= '0;
      k <= '0; flag <= 1'b0; i <= '0; j <= '0; c <= '0;
      done <= 1'b0; err_valid <= 1'b0; err_bit <= 1'b0; nerr <= '0;
      for (int n = 0; n < 2 * T; n++) z[n] <= '0;
      for (int n = 0; n <= T; n++)    lam[n] <= '0;
      for (int n = 0; n < T + 2; n++) bb[n] <= '0;
    end else begin
      done      <= 1'b0;
      err_valid <= 1'b0;
      case (state)
        D_IDLE: if (start) begin
          s_q   <= syn;
          i     <= '0;
          j     <= '0;
          acc   <= '0;
          ev    <= gf_t'(1);
          cur   <= ALPHA;
          nerr  <= '0;
          state <= D_SYN;
        end
        // ---- Algorithm 1: z_i = s(alpha^(i+1))
        D_SYN: begin
          ev <= m1;
          if (j == JW'(NK - 1)) begin
            z[zi] <= acc_n;
            acc  <= '0;
            ev   <= gf_t'(1);
            cur  <= gf_mul_alpha(cur);
            j    <= '0;
            if (i == 8'(2 * T - 1)) state <= D_BMI;
            else                    i <= i + 1'b1;
          end else begin
            acc <= acc_n;
            j   <= j + 1'b1;
          end
        end
        // ---- Algorithm 3: inversionless Berlekamp-Massey
        D_BMI: begin
          for (int n = 0; n <= T; n++)    lam[n] <= (n == 0) ? gf_t'(1) : '0;
          for (int n = 0; n < T + 2; n++) bb[n]  <= (n == 1) ? gf_t'(1) : '0;
          gam   <= gf_t'(1);
          k     <= '0;
          i     <= '0;
          j     <= '0;
          delta <= '0;
          state <= D_DELTA;
        end
        D_DELTA: begin
          delta <= delta_n;
          if (8'(j) == jmax) begin
            flag  <= (delta_n != '0) && (k >= 0);
            j     <= JW'(T);
            state <= D_UPD;
          end else begin
            j <= j + 1'b1;
          end
        end
        D_UPD: begin
          lam[jl]  <= m1 ^ m2;
          bb[j+1] <= flag ? lam[jl] : bb[jl];
          if (j == '0) begin
            if (flag) begin
              gam <= delta;
              k   <= -k - 8'sd1;
            end else begin
              k   <= k + 8'sd1;
            end
            delta <= '0;
            if (i == 8'(2 * T - 1)) begin
              j     <= JW'(1);
              cur   <= A_SHORT;
              state <= D_PRE;
            end else begin
              i     <= i + 1'b1;
              state <= D_DELTA;
            end
          end else begin
            j <= j - 1'b1;
          end
        end
        // ---- shortening: Lambda_j *= alpha^(j*SHORT)
        D_PRE: begin
          lam[jl] <= m1;
          cur    <= m2;
          if (j == JW'(T)) begin
            j     <= JW'(1);
            cur   <= ALPHA;
            ev    <= lam[0];
            c     <= '0;
            state <= D_CHIEN;
          end else begin
            j <= j + 1'b1;
          end
        end
        // ---- Algorithm 2: Chien search
        D_CHIEN: begin
          lam[jl] <= m1;
          cur    <= gf_mul_alpha(cur);
          if (j == JW'(T)) begin
            err_valid <= 1'b1;
            err_bit   <= (ev_n == '0);
            if (ev_n == '0) nerr <= nerr + 1'b1;
            ev  <= lam[0];
            cur <= ALPHA;
            j   <= JW'(1);
            if (c == $bits(c)'(N - 1)) begin
              done  <= 1'b1;
              state <= D_IDLE;
            end else begin
              c <= c + 1'b1;
            end
          end else begin
            ev <= ev_n;
            j  <= j + 1'b1;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign busy = (state != D_IDLE);

endmodule
