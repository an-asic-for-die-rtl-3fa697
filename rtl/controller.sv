// controller: the microcoded controller of the processor.
//
// A program counter addresses the 163-word microcode ROM; the word read is
// the microinstruction that sets every execution unit in this cycle. Its
// sequencing field chooses the next address: the next word, a jump, a branch
// taken when a datapath flag (ALU_1 carry or zero, ALU_2 zero or negative,
// optionally inverted) holds, or halt. A two-state FSM (IDLE, RUN) starts
// the program at word 0 on `start` and returns to IDLE on a halt, pulsing
// `done`. While idle the controller issues all-zero words, which make every
// unit hold its state. Flags are those registered by earlier instructions.
// The microprogrammed structure, the flag-driven program counter and the ROM
// size are the design's; the sequencing encodings and the start/done
// handshake are this design's choices.
module controller
  import edm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  flags_t          alu1_flags,
  input  flags_t          alu2_flags,
  output mc_t             mc,
  output logic [PC_W-1:0] pc,
  output logic            busy,
  output logic            done
);
  typedef enum logic { S_IDLE, S_RUN } state_e;
  state_e state;
  mc_t    word;
  logic   cond, flag;

  microcode_rom u_rom (.addr(pc), .word(word));

  assign busy = (state == S_RUN);
  assign mc   = busy ? word : '0;

  always_comb begin
    unique case (word.seq_cnd[1:0])
      CND_ALU1_C: flag = alu1_flags.c;
      CND_ALU1_Z: flag = alu1_flags.z;
      CND_ALU2_Z: flag = alu2_flags.z;
      CND_ALU2_N: flag = alu2_flags.n;
      default:    flag = 1'b0;
    endcase
    cond = flag ^ word.seq_cnd[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          pc    <= '0;
        end
        S_RUN: begin
          unique case (word.seq_op)
            SEQ_NEXT:   pc <= pc + 1'b1;
            SEQ_JUMP:   pc <= word.seq_tgt;
            SEQ_BRANCH: pc <= cond ? word.seq_tgt : pc + 1'b1;
            SEQ_HALT: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
            default:    pc <= pc + 1'b1;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
