// control2_163: controller of AU-2 in the GF(2^163) processor. It fetches
// instructions from the instruction memory, presents their operand addresses
// to data memory, starts AU-2, and writes AU-2's result back to data memory;
// at the END instruction it pulses done to the host interface.
//
// Each instruction takes an issue cycle plus AU-2's latency (1 cycle for ADD,
// 3 cycles of word-level multiplication plus hand-over for MUL). The fetch /
// issue / write-back structure follows the design's description of control-2;
// the timing is this implementation's. Active-low synchronous reset.
// Lint note: only the opcode of instr is used here; its address and rotation
// fields go straight from the instruction memory to data memory and AU-2.
module control2_163
  import ecc163_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic [4:0] pc,
  input  instr_t     instr,
  output logic       au_start,
  output logic       au_mul,
  input  logic       au_done,
  output logic       dm_we,
  output logic       busy,
  output logic       done
);
  typedef enum logic [1:0] {K_IDLE, K_ISSUE, K_WAIT} kst_t;
  kst_t st;

  assign au_start = (st == K_ISSUE) && (instr.op != I_END);
  assign au_mul   = (instr.op == I_MUL);
  assign dm_we    = (st == K_WAIT) && au_done;
  assign busy     = (st != K_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= K_IDLE; pc <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        K_IDLE:  if (start) begin pc <= '0; st <= K_ISSUE; end
        K_ISSUE: if (instr.op == I_END) begin done <= 1'b1; st <= K_IDLE; end
                 else st <= K_WAIT;
        K_WAIT:  if (au_done) begin pc <= pc + 5'd1; st <= K_ISSUE; end
        default: st <= K_IDLE;
      endcase
    end
  end
endmodule
