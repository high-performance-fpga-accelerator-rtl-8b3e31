// program_controller: sequencer that runs one statically scheduled subroutine from the
// program ROM.
//
// 'go' with an entry address starts a subroutine. Every ROM word issues one operation and
// then holds the sequencer for 'delay' idle cycles, so the issue cycle of every operation is
// fixed by the program: there is no scoreboard and no stall, and the program itself guarantees
// that operands are written before they are read and that write-backs never collide. The
// operand addresses go to the memory unit at the issue cycle; the operation, multiplier index
// and destination are delayed by the two-cycle memory read latency so that they reach the ALU
// together with the operands. An OP_END word ends the subroutine: 'done' pulses and 'busy'
// drops. The program ROM is read one cycle ahead (registered ROM output).
// Timing: the first operation is issued two cycles after 'go' (one cycle for the ROM read,
// one for loading the first word).
// Statically scheduled subroutines follow the published design; the idle-count instruction
// encoding is this implementation's choice.
module program_controller
  import sike_pkg::*;
#(
  parameter int unsigned AW = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [AW-1:0]     entry,
  output logic              busy,
  output logic              done,
  // program ROM
  output logic [AW-1:0]     rom_addr,
  input  instr_t            rom_q,
  // memory unit read ports
  output logic              rd_en,
  output logic [MEM_AW-1:0] rd_addr_a,
  output logic [MEM_AW-1:0] rd_addr_b,
  // ALU issue, aligned with the operands read two cycles earlier
  output logic              alu_valid,
  output alu_op_e           alu_op,
  output logic [UNIT_W-1:0] alu_unit,
  output logic [MEM_AW-1:0] alu_dst
);
  typedef enum logic [1:0] {IDLE, LOAD, RUN} state_e;
  state_e            state;
  logic [AW-1:0]     pc;      // address of the word currently on rom_q (in RUN)
  logic [DELAY_W-1:0] wait_cnt;
  logic              issue;

  assign issue = (state == RUN) && (wait_cnt == '0) && (rom_q.op != OP_END);

  always_comb begin
    case (state)
      IDLE:    rom_addr = entry;
      default: rom_addr = issue ? pc + 1'b1 : pc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      pc       <= '0;
      wait_cnt <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (go) begin
          state    <= LOAD;
          pc       <= entry;
          wait_cnt <= '0;
        end
        LOAD: state <= RUN;   // rom_q now holds the word at 'entry'
        default: begin
          if (wait_cnt != '0) begin
            wait_cnt <= wait_cnt - 1'b1;
          end else if (rom_q.op == OP_END) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            pc       <= pc + 1'b1;
            wait_cnt <= rom_q.delay;
          end
        end
      endcase
    end
  end

  assign busy      = (state != IDLE);
  assign rd_en     = issue;
  assign rd_addr_a = rom_q.src_a;
  assign rd_addr_b = rom_q.src_b;

  // two-cycle alignment with the memory read
  logic    v_d [2];
  instr_t  i_d [2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d[0] <= 1'b0;
      v_d[1] <= 1'b0;
    end else begin
      v_d[0] <= issue;
      v_d[1] <= v_d[0];
    end
  end
  always_ff @(posedge clk) begin
    i_d[0] <= rom_q;
    i_d[1] <= i_d[0];
  end

  assign alu_valid = v_d[1];
  assign alu_op    = i_d[1].op;
  assign alu_unit  = i_d[1].unit;
  assign alu_dst   = i_d[1].dst;
endmodule
