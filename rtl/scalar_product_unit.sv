// Scalar product r . S = rx*sx + ry*sy + rz*sz with a time-flexible
// multiplier, for a moving object whose speed limits the time available.
//
// One flexible multiplier computes the three component products one after
// another; an accumulating adder sums them. When an operation starts, the
// operation control turns the object's speed into a selection code, held
// for the whole operation: the faster the object, the fewer partial
// products are combined and the sooner the result is ready.
//
// The multiplier is combinational. Its operands come from registers and
// stay stable while the selected path settles; the sequencer then lets the
// accumulator capture the product. So each selection is a multicycle path
// of SEL_CYCLES[sel] clock cycles. The defaults (5, 6, 8 and 10 cycles for
// SEL_1..SEL_4) are the measured delays of three multiplications in the
// application example (14.02, 16.07, 23.23 and 28.88 ns) divided by three
// and rounded up to whole periods of an assumed 1 ns clock; they must be
// set to match the timing of the target technology.
//
// Interface (all on the rising edge of clk, rst_n asynchronous active low):
//   start    one-cycle request, taken when busy is low; r_vec, s_vec and
//            speed are sampled in that cycle
//   busy     high from the cycle after start until the result is written
//   done     one-cycle pulse; result, ovf and sel_used are valid from then
//            until the next start
//   result   2n-bit fraction (operands are n-bit fractions in [0, 1))
//   ovf      the sum reached 1.0 or more and result holds it modulo 1
// Latency: done rises 3 * SEL_CYCLES[sel] + 1 cycles after the start
// cycle, i.e. the operation takes 3 * SEL_CYCLES[sel] busy cycles.
// Structure after the application architecture: operation control,
// flexible multiplication and an addition stage with feedback. The
// handshake, the cycle counts and the overflow flag are this design's.
// Lint note: rst_n is used both as the asynchronous register reset and,
// through disable iff, synchronously by the assertions at the end; that is
// why a sync/async reset warning is reported for it, and it is intended.
module scalar_product_unit
  import flex_pkg::*;
#(
  parameter int unsigned           K       = 8,
  parameter int unsigned           SPEED_W = 8,
  parameter logic [3:0][7:0]       SEL_CYCLES = {8'd10, 8'd8, 8'd6, 8'd5}
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SPEED_W-1:0] speed,
  input  logic [4*K-1:0]     r_vec [3],
  input  logic [4*K-1:0]     s_vec [3],
  output logic               busy,
  output logic               done,
  output logic [8*K-1:0]     result,
  output logic               ovf,
  output sel_t               sel_used
);

  localparam int unsigned N = 4 * K;

  typedef enum logic {S_IDLE, S_MUL} state_t;

  state_t         state;
  logic [N-1:0]   r_q [3];
  logic [N-1:0]   s_q [3];
  logic [1:0]     comp;
  logic [7:0]     cnt;
  sel_t           sel_now;
  sel_t           sel_q;
  logic [8*K-1:0] prod;
  logic           capture;

  op_control #(.SPEED_W(SPEED_W)) u_ctl (.speed(speed), .sel(sel_now));

  flex_mult #(.K(K)) u_mul (
    .a   (r_q[comp]),
    .b   (s_q[comp]),
    .sel (sel_q),
    .r   (prod)
  );

  // The selected path has settled in the last cycle of the count.
  assign capture = (state == S_MUL) && (cnt == 8'd1);

  dot_accumulator #(.W(8*K)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (capture && (comp == 2'd0)),
    .en    (capture),
    .din   (prod),
    .acc   (result),
    .ovf   (ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      comp  <= '0;
      cnt   <= '0;
      sel_q <= SEL_4;
      done  <= 1'b0;
      for (int c = 0; c < 3; c++) begin
        r_q[c] <= '0;
        s_q[c] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            r_q   <= r_vec;
            s_q   <= s_vec;
            sel_q <= sel_now;
            comp  <= '0;
            cnt   <= SEL_CYCLES[sel_now];
            state <= S_MUL;
          end
        end
        S_MUL: begin
          if (capture) begin
            cnt <= SEL_CYCLES[sel_q];
            if (comp == 2'd2) begin
              comp  <= '0;
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              comp <= comp + 2'd1;
            end
          end else begin
            cnt <= cnt - 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state == S_MUL);
  assign sel_used = sel_q;

  // A path needs at least one cycle; a zero count would never capture.
  initial begin
    for (int i = 0; i < 4; i++) begin
      assert (SEL_CYCLES[i] != 8'd0) else $error("SEL_CYCLES[%0d] must be non-zero", i);
    end
  end

  // The selection may not change while a product is being formed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_MUL && !capture) |=> $stable(sel_q));
  // done is only raised when the operation has ended.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
