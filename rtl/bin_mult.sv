// bin_mult: sequential shift-and-add binary multiplier, the first unit built
// on the way to the transform design.
//
// It multiplies two unsigned N-bit numbers with one N-bit adder in N steps.
// The datapath holds the multiplicand in register B, builds the upper half
// of the product in register A with its carry flip-flop C, and shifts the
// multiplier out of register Q while the lower half of the product shifts
// in. A down counter P with a zero detect counts the steps. The control
// unit has three states:
//   IDLE  on go: B <- multiplicand, Q <- multiplier, A <- 0, C <- 0,
//         P <- N - 1
//   ADD   if Q[0] = 1: {C, A} <- A + B
//   SHIFT {C, A, Q} shifted right one place, C <- 0, P <- P - 1;
//         back to IDLE after the step in which P was zero
// This is the classic textbook multiplier the reference design chose; the
// reference design built its registers, counter, zero detect and adder but
// not the control unit, so the control unit here follows the textbook.
// Interface: raise go for one cycle while busy is low. done pulses when
// product = multiplicand * multiplier is ready; product holds until the
// next go. Latency: done is high 2N clock edges after the edge that samples
// go (16 for N = 8): one add step and one shift step per multiplier bit.
// Reset is synchronous and active high.
module bin_mult #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           go,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ADD, S_SHIFT} state_e;

  state_e         state;
  logic [N-1:0]   b, a, q;
  logic           c;
  logic [PW-1:0]  p;
  logic           z;                     // zero detect on counter P
  logic [N:0]     sum;                   // parallel adder with carry out

  assign z       = (p == '0);
  assign sum     = {1'b0, a} + {1'b0, b};
  assign busy    = state != S_IDLE;
  assign product = {a, q};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      {b, a, q, c, p} <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          b     <= multiplicand;
          q     <= multiplier;
          a     <= '0;
          c     <= 1'b0;
          p     <= PW'(N - 1);
          state <= S_ADD;
        end
        S_ADD: begin
          if (q[0]) {c, a} <= sum;
          state <= S_SHIFT;
        end
        default: begin                   // S_SHIFT
          {c, a, q} <= {1'b0, c, a, q[N-1:1]};
          p <= p - PW'(1);
          if (z) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_ADD;
          end
        end
      endcase
    end
  end
endmodule
