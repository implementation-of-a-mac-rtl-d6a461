// serial_muldiv: bit-serial q = floor(a * b / d), the multiplier and divider of the MAC-ALU.
//
// A serial operator is used instead of a parallel one because it costs area linear, not
// quadratic, in the word width; the scheduler has a whole half frame for its arithmetic.
// start (with a, b, d held for that one clock) begins the operation: WA clocks of shift-and-add
// multiplication produce the WA+WB bit product, then WP = WA+WB clocks of restoring division by
// d produce the quotient. done pulses for one clock with q valid (q holds its value until the
// next start); busy is high in between. Latency: WA + WA + WB + 1 clocks (25 at the defaults).
// The caller guarantees d != 0 and a <= d, so the quotient never exceeds b and fits WB bits
// (with d = 0 the result is all ones). Operand widths follow the 8-bit queue-length and grant
// registers and the 16-bit total register of the MAC-ALU figure.
// The assertion block below uses rst_n in its disable condition; lint reports this as a
// synchronous use of the asynchronous reset, which it is only for checking, not for logic.
module serial_muldiv #(
  parameter int WA = 8,   // multiplicand: queue length C_i or V_i
  parameter int WB = 8,   // multiplier: Y or SUB_Y, also the quotient width
  parameter int WD = 16   // divisor: CBR_t or VBR_t
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WA-1:0] a,
  input  logic [WB-1:0] b,
  input  logic [WD-1:0] d,
  output logic          busy,
  output logic          done,
  output logic [WB-1:0] q
);

  localparam int WP = WA + WB;

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV} state_t;
  state_t state;

  logic [WA-1:0] mplier;
  logic [WP-1:0] mcand, prod;
  logic [WD-1:0] dsor;
  logic [WD:0]   rem;
  logic [WP-1:0] quo;
  logic [$clog2(WP+1)-1:0] n;
  logic [WD:0]   rem_sh, rem_sub;

  assign busy    = (state != S_IDLE);
  assign rem_sh  = {rem[WD-1:0], quo[WP-1]};
  assign rem_sub = rem_sh - {1'b0, dsor};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      q      <= '0;
      mplier <= '0;
      mcand  <= '0;
      prod   <= '0;
      dsor   <= '0;
      rem    <= '0;
      quo    <= '0;
      n      <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          mplier <= a;
          mcand  <= {{WB{1'b0}}, b};
          prod   <= '0;
          dsor   <= d;
          n      <= '0;
          state  <= S_MUL;
        end
        S_MUL: begin
          if (mplier[0]) prod <= prod + mcand;
          mplier <= mplier >> 1;
          mcand  <= mcand << 1;
          n      <= n + 1'b1;
          if (n == ($bits(n))'(WA - 1)) begin
            n     <= '0;
            state <= S_DIV;
            rem   <= '0;
            quo   <= mplier[0] ? prod + mcand : prod;
          end
        end
        S_DIV: begin
          // one restoring-division step: shift in the next dividend bit, subtract if possible
          if (!rem_sub[WD]) rem <= rem_sub;
          else              rem <= rem_sh;
          quo <= {quo[WP-2:0], !rem_sub[WD]};
          n   <= n + 1'b1;
          if (n == ($bits(n))'(WP - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
            q     <= WB'({quo[WP-2:0], !rem_sub[WD]});
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Caller contract: a new operation starts only when the last has ended, and a <= d with
  // d != 0, so that the quotient fits in WB bits.
  a_start: assert property (@(posedge clk) disable iff (!rst_n)
                            start |-> !busy && d != '0 && WD'(a) <= d);
endmodule
