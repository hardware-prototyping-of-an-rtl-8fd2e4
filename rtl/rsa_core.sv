// rsa_core: flexible-key RSA modular exponentiation, C = M^E mod N.
//
// The same core encrypts (E = e, public exponent) and decrypts (E = d,
// private exponent); only the exponent applied on E differs.
//
// How it works. A single state machine steers one (W+2)-bit adder/subtractor
// (rsa_alu) through three nested loops, with no multiplier and no divider:
//   * exponentiation, left-to-right binary method: the exponent is scanned from
//     bit SIZE-1 down to bit 0. Leading zero bits cost one cycle each. At the
//     first one bit C := M; for each later bit C := C*C mod N, followed by
//     C := C*M mod N when the bit is one. An all-zero exponent gives C = 1.
//   * modular multiplication P = A*B mod N, interleaved: P := 0, then for each
//     of the SIZE bits of B, most significant first, P := 2P mod N and, when
//     the bit is one, P := P + A mod N.
//   * modular reduction by repeated subtraction: after each doubling or
//     addition, N is subtracted as long as the result stays non-negative; the
//     first subtraction that goes negative is discarded.
// The working register P has two bits more than the data (W+2) so that 2P,
// P+A and the trial difference never overflow.
//
// Interface. GO starts an operation when READY is high; M, E, N and SIZE are
// sampled on that edge, so they need not be held. DONE rises when the result
// is on C and stays high (READY too) until the next GO or RST. RST is
// synchronous, active high, and returns the core to idle. M must be below N
// (the usual RSA rule); N must be above 1. Bits of M, E and N at or above the
// selected key size are ignored.
//
// Timing. One ALU step per clock: a modular multiplication takes, per bit of
// B, 2 + r1 cycles, plus 2 + r2 more when the bit is one, where r1 and r2 are
// the numbers of successful subtractions (0 or 1 when M < N). Each exponent
// bit adds one cycle for the scan step.
//
// The algorithms, the single-ALU datapath, the +2-bit registers, the port
// names (M, E, N, SIZE, RST, GO, C, DONE) and the run-time key size follow the
// published design. The READY output, the cycle-level schedule and the choice
// to skip leading exponent zeros are this design's own.
module rsa_core
  import rsa_pkg::*;
#(
  parameter int unsigned W = MAX_BITS   // widest key, bits
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          go,
  input  logic [W-1:0]  m,
  input  logic [W-1:0]  e,
  input  logic [W-1:0]  n,
  input  key_size_e     size,
  output logic [W-1:0]  c,
  output key_size_e     c_size,
  output logic          done,
  output logic          ready
);

  localparam int unsigned CW = $clog2(W);  // loop-variable width (10 bits at 1024)

  typedef enum logic [2:0] {
    S_IDLE,   // waiting for GO
    S_EXP,    // look at the current exponent bit
    S_DBL,    // P := P + P
    S_RED,    // trial P - N, keep it while non-negative
    S_ADD,    // P := P + A
    S_DONE    // result on C
  } state_e;

  state_e        state;
  logic [W-1:0]  m_r, n_r, e_r, b_r, c_r;
  logic [W+1:0]  p_r;
  logic [CW-1:0] ecnt, mcnt;     // exponent and multiplication loop variables
  key_size_e     size_r;
  logic          started;        // first one bit of the exponent seen
  logic          sqr;            // current multiplication is the squaring
  logic          after_add;      // current reduction follows the addition

  // Bit index of the most significant bit for a key size, capped at W.
  function automatic logic [CW-1:0] msb_index(input key_size_e s);
    int unsigned b;
    b = key_bits(s);
    if (b > W) b = W;
    return CW'(b - 1);
  endfunction

  // Bits of a word below the key size (higher bits cleared).
  function automatic logic [W-1:0] size_mask(input key_size_e s);
    return {W{1'b1}} >> (W - 1 - int'(msb_index(s)));
  endfunction

  logic [CW-1:0] msb;
  logic          ebit, bbit;
  assign msb  = msb_index(size_r);
  assign ebit = e_r[msb];
  assign bbit = b_r[msb];

  // ALU operand routing
  logic [W+1:0] alu_b, alu_y;
  logic         alu_sub;
  logic [W-1:0] mult_a;
  assign mult_a = sqr ? c_r : m_r;

  always_comb begin
    alu_sub = 1'b0;
    alu_b   = p_r;
    unique case (state)
      S_ADD:   alu_b = {2'b00, mult_a};
      S_RED: begin
        alu_sub = 1'b1;
        alu_b   = {2'b00, n_r};
      end
      default: alu_b = p_r;            // S_DBL: P + P
    endcase
  end

  rsa_alu #(.W(W + 2)) u_alu (
    .a   (p_r),
    .b   (alu_b),
    .sub (alu_sub),
    .y   (alu_y)
  );

  logic neg;                     // trial difference went negative
  assign neg = alu_y[W+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      started   <= 1'b0;
      sqr       <= 1'b0;
      after_add <= 1'b0;
      ecnt      <= '0;
      mcnt      <= '0;
      m_r       <= '0;
      n_r       <= '0;
      e_r       <= '0;
      b_r       <= '0;
      c_r       <= '0;
      p_r       <= '0;
      size_r    <= KEY_32;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (go) begin
            m_r     <= m & size_mask(size);
            n_r     <= n & size_mask(size);
            e_r     <= e & size_mask(size);
            size_r  <= size;
            ecnt    <= msb_index(size);
            c_r     <= W'(1);
            started <= 1'b0;
            state   <= S_EXP;
          end
        end

        S_EXP: begin
          if (started) begin
            // square first
            sqr       <= 1'b1;
            b_r       <= c_r;
            p_r       <= '0;
            mcnt      <= msb;
            after_add <= 1'b0;
            state     <= S_DBL;
          end else begin
            if (ebit) begin
              c_r     <= m_r;
              started <= 1'b1;
            end
            e_r <= e_r << 1;
            if (ecnt == '0) state <= S_DONE;
            else            ecnt  <= ecnt - 1'b1;
          end
        end

        S_DBL: begin
          p_r   <= alu_y;
          state <= S_RED;
        end

        S_ADD: begin
          p_r       <= alu_y;
          after_add <= 1'b1;
          state     <= S_RED;
        end

        S_RED: begin
          if (!neg) begin
            p_r <= alu_y;                         // subtract again
          end else if (!after_add && bbit) begin
            state <= S_ADD;
          end else begin
            // this bit of B is finished
            after_add <= 1'b0;
            b_r       <= b_r << 1;
            if (mcnt != '0) begin
              mcnt  <= mcnt - 1'b1;
              state <= S_DBL;
            end else begin
              // multiplication finished
              c_r <= p_r[W-1:0];
              if (sqr && ebit) begin
                sqr   <= 1'b0;                    // now C := M * C
                b_r   <= p_r[W-1:0];
                p_r   <= '0;
                mcnt  <= msb;
                state <= S_DBL;
              end else begin
                e_r <= e_r << 1;
                if (ecnt == '0) state <= S_DONE;
                else begin
                  ecnt  <= ecnt - 1'b1;
                  state <= S_EXP;
                end
              end
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign c      = c_r;
  assign c_size = size_r;
  assign done   = (state == S_DONE);
  assign ready  = (state == S_IDLE) || (state == S_DONE);

endmodule
