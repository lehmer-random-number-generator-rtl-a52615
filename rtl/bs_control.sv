// bs_control: control unit of the temporal bit-serial generator: next-state
// logic, state register and opcode logic (a Moore/Mealy algorithmic state
// machine driving bs_datapath).
//
// Sequence for one random number (st = 1 in IDLE):
//   IDLE, st:  load A <- Z, B <- E1, clear C, k <- 30.
//   PASS:      31 cycles per pass: shift A, rotate B, C takes the carry,
//              count k down. In the cycle with zr = 1 (last bit) B is loaded
//              with the next rotation (E2, E5, E7, E8, E14), or cleared after
//              the sixth addition, and k is reloaded. The seventh pass adds 0
//              so that the carry left in C is absorbed. It cannot leave a
//              carry itself: that would need the sixth pass to reach
//              A + E14 + C = 2^32 - 1, i.e. A, E14 and C all ones, and for
//              Z = all ones A stays at 2^31 - 2 (lrng_bit_serial asserts it).
//   DONE:      one cycle, done = 1: the generator copies A into Z.
// From st to done: 1 + 7*31 = 218 cycles.
// The block structure (st, zr in, state register, opcode logic) follows the
// case study; the states and the timing are this design's. Reset is
// synchronous, active low.
module bs_control
  import lrng_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     st,
  input  logic     zr,
  output bs_ctrl_t opcds
);
  typedef enum logic [1:0] {S_IDLE, S_PASS, S_DONE} state_e;

  state_e     stt, nxt_st;
  logic [2:0] pass, nxt_pass;   // 1..6: adding E(sel); 7: absorbing the carry

  // Next-state and opcode logic.
  always_comb begin
    nxt_st     = stt;
    nxt_pass   = pass;
    opcds      = '0;
    opcds.opa  = R_NOP;
    opcds.opb  = R_NOP;
    opcds.opc  = R_NOP;
    opcds.opk  = R_NOP;
    opcds.sel  = pass;
    unique case (stt)
      S_IDLE: begin
        if (st) begin
          opcds.opa = R_LOAD;
          opcds.opb = R_LOAD;
          opcds.sel = 3'd1;
          opcds.opc = R_CLR;
          opcds.opk = R_LOAD;
          nxt_pass  = 3'd1;
          nxt_st    = S_PASS;
        end
      end
      S_PASS: begin
        opcds.busy = 1'b1;
        opcds.opa  = R_SHIFT;
        opcds.opc  = R_SHIFT;
        opcds.opb  = R_SHIFT;
        opcds.opk  = R_SHIFT;
        if (zr) begin
          opcds.opk = R_LOAD;
          if (pass < 3'd6) begin
            opcds.opb = R_LOAD;
            opcds.sel = pass + 3'd1;
            nxt_pass  = pass + 3'd1;
          end else if (pass == 3'd6) begin
            opcds.opb = R_CLR;
            nxt_pass  = 3'd7;
          end else begin
            nxt_st = S_DONE;
          end
        end
      end
      S_DONE: begin
        opcds.busy = 1'b1;
        opcds.done = 1'b1;
        nxt_st     = S_IDLE;
      end
      default: nxt_st = S_IDLE;
    endcase
  end

  // State register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stt  <= S_IDLE;
      pass <= 3'd0;
    end else begin
      stt  <= nxt_st;
      pass <= nxt_pass;
    end
  end
endmodule
