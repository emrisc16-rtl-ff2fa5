// emrisc16_control: Processor Control Unit of the EmRISC16.
//
// Holds the two interrupt latches, the enable-interrupts bit (EIB) and the
// state machine that sequences every instruction, and drives the bus strobes.
//
// Instruction timing (cycles counted from the first fetch cycle), as the
// document gives it:
//   fetch, cycles 1-8: odd cycles put the PC on the address bus, assert RD_
//     and load one instruction byte; even cycles release RD_ and add 1 to PC.
//   cycle 9 executes ALU, jump, branch and system instructions (9 cycles).
//   acall/rcall: rd <- PC (as PC >> 2) in cycle 9, PC <- target in 10.
//   trap: INTPC <- PC and EIB <- 0 in cycle 9, PC <- 0x10 in cycle 10.
//   loads (lbu, lbs, lw): address in 9; address held, RD_ low and the byte
//     written to rd in 10.
//   stores (sbl, sbh, sw): address and data in 9, WR_ low in 10, 11 a
//     recovery cycle with WR_ high before the next fetch's RD_.
//   ior: address 9-12, RD_ low 10-12, data taken at the end of 12.
//   iow: address and data 9-12, WR_ low only in 12.
//   halt: the core stops after cycle 9 until reset or an enabled interrupt.
// An interrupt is taken instead of a fetch, at an instruction boundary, when
// its latch and EIB are both set. Entry takes three cycles: EIB <- 0, INTPC
// <- PC, PC <- vector (0x10 for A, 0x20 for B; A wins over B). The latch of
// the interrupt taken is then cleared. DBOUT_ is low whenever the core drives
// the data bus (cycles 9-11 of a store, 9-12 of iow).
//
// Own choices: the interrupt pins are sampled by two flip-flops on the clock
// and a rising edge is found by comparing successive samples (the document
// clocks its latches directly from the pins); trap uses the interrupt A
// vector; the EIB value that decides whether an interrupt is taken at a
// boundary is the one just written by the finishing instruction; rst is
// active high and asynchronous and leaves the core about to fetch from 0 with
// EIB clear. Opcodes not in the instruction set execute as 9-cycle no-ops.
module emrisc16_control
  import emrisc16_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] op,
  input  logic       br_true,
  input  logic       irqa,
  input  logic       irqb,
  // datapath controls
  output logic       ir_wr,
  output logic [1:0] ir_sel,
  output logic       pc_wr,
  output pcsrc_e     pcsrc_sel,
  output logic       intpc_wr,
  output logic       reg_wr,
  output wsrc_e      wsrc,
  output logic       addr_sel,
  // bus strobes, active low
  output logic       rd_n,
  output logic       wr_n,
  output logic       dbout_n,
  // status
  output logic       eib,
  output logic       halted,
  output logic       int_entry  // high in the last cycle of interrupt entry
);

  typedef enum logic [1:0] {ST_FETCH, ST_EXEC, ST_INTR, ST_HALT} state_e;

  state_e     state;
  logic [2:0] step;
  logic [2:0] exec_len;
  logic       last_exec;

  logic [2:0] irqa_s, irqb_s;       // synchroniser and edge history
  logic       irqa_l, irqb_l;       // interrupt latches
  logic       irqa_clr, irqb_clr;
  logic       eib_wr, eib_new, eib_next, irq_go;
  logic       rd, wr, dbout;

  // Number of execute cycles after the 8 fetch cycles.
  always_comb begin
    unique case (op)
      OP_TRAP, OP_ACALL, OP_RCALL, OP_LBU, OP_LBS, OP_LW: exec_len = 3'd2;
      OP_SBL, OP_SBH, OP_SW:                             exec_len = 3'd3;
      OP_IOR, OP_IOW:                                    exec_len = 3'd4;
      default:                                           exec_len = 3'd1;
    endcase
  end

  assign last_exec = (state == ST_EXEC) && (step == exec_len - 3'd1);
  assign eib_next  = eib_wr ? eib_new : eib;
  assign irq_go    = eib_next && (irqa_l || irqb_l);
  assign halted    = (state == ST_HALT);
  assign int_entry = (state == ST_INTR) && (step == 3'd2);

  // Datapath controls and strobes.
  always_comb begin
    ir_wr     = 1'b0;
    ir_sel    = step[2:1];
    pc_wr     = 1'b0;
    pcsrc_sel = PCSRC_INC;
    intpc_wr  = 1'b0;
    reg_wr    = 1'b0;
    wsrc      = WSRC_ALU;
    addr_sel  = 1'b0;
    rd        = 1'b0;
    wr        = 1'b0;
    dbout     = 1'b0;
    eib_wr    = 1'b0;
    eib_new   = 1'b0;
    irqa_clr  = 1'b0;
    irqb_clr  = 1'b0;
    unique case (state)
      ST_FETCH: begin
        if (!step[0]) begin
          rd    = 1'b1;
          ir_wr = 1'b1;
        end else begin
          pc_wr = 1'b1;
        end
      end
      ST_EXEC: begin
        unique casez (op)
          OP_JA: begin
            pc_wr = 1'b1; pcsrc_sel = PCSRC_DEC;
          end
          OP_JR: begin
            pc_wr = 1'b1; pcsrc_sel = PCSRC_REG;
          end
          OP_BEQZ, OP_BNEZ: begin
            pc_wr = br_true; pcsrc_sel = PCSRC_DEC;
          end
          OP_ACALL, OP_RCALL: begin
            if (step == 3'd0) begin
              reg_wr = 1'b1; wsrc = WSRC_PC;
            end else begin
              pc_wr     = 1'b1;
              pcsrc_sel = (op == OP_ACALL) ? PCSRC_DEC : PCSRC_REG;
            end
          end
          OP_DI: begin
            eib_wr = 1'b1; eib_new = 1'b0;
          end
          OP_EI: begin
            eib_wr = 1'b1; eib_new = 1'b1;
          end
          OP_REI: begin
            pc_wr = 1'b1; pcsrc_sel = PCSRC_INTPC;
            eib_wr = 1'b1; eib_new = 1'b1;
          end
          OP_RFE: begin
            pc_wr = 1'b1; pcsrc_sel = PCSRC_INTPC;
          end
          OP_TRAP: begin
            if (step == 3'd0) begin
              intpc_wr = 1'b1;
              eib_wr   = 1'b1; eib_new = 1'b0;
            end else begin
              pc_wr = 1'b1; pcsrc_sel = PCSRC_IADDRA;
            end
          end
          OP_LBU, OP_LBS, OP_LW: begin
            addr_sel = 1'b1;
            if (step == 3'd1) begin
              rd = 1'b1; reg_wr = 1'b1; wsrc = WSRC_MEM;
            end
          end
          OP_SBL, OP_SBH, OP_SW: begin
            addr_sel = 1'b1;
            dbout    = 1'b1;
            wr       = (step == 3'd1);
          end
          OP_IOR: begin
            addr_sel = 1'b1;
            rd       = (step != 3'd0);
            if (step == 3'd3) begin
              reg_wr = 1'b1; wsrc = WSRC_MEM;
            end
          end
          OP_IOW: begin
            addr_sel = 1'b1;
            dbout    = 1'b1;
            wr       = (step == 3'd3);
          end
          6'b1?????: begin
            reg_wr = 1'b1;
            wsrc   = is_shift(op) ? WSRC_SHIFT : WSRC_ALU;
          end
          default: ;
        endcase
      end
      ST_INTR: begin
        unique case (step)
          3'd0: begin
            eib_wr = 1'b1; eib_new = 1'b0;
          end
          3'd1: intpc_wr = 1'b1;
          default: begin
            pc_wr = 1'b1;
            if (irqa_l) begin
              pcsrc_sel = PCSRC_IADDRA; irqa_clr = 1'b1;
            end else begin
              pcsrc_sel = PCSRC_IADDRB; irqb_clr = 1'b1;
            end
          end
        endcase
      end
      default: ;  // ST_HALT
    endcase
  end

  assign rd_n    = !rd;
  assign wr_n    = !wr;
  assign dbout_n = !dbout;

  // Sequencer.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= ST_FETCH;
      step  <= '0;
    end else begin
      unique case (state)
        ST_FETCH: begin
          step <= step + 3'd1;
          if (step == 3'd7) begin
            state <= ST_EXEC;
            step  <= '0;
          end
        end
        ST_EXEC: begin
          step <= step + 3'd1;
          if (last_exec) begin
            step <= '0;
            if (op == OP_HALT) state <= ST_HALT;
            else if (irq_go)   state <= ST_INTR;
            else               state <= ST_FETCH;
          end
        end
        ST_INTR: begin
          step <= step + 3'd1;
          if (step == 3'd2) begin
            state <= ST_FETCH;
            step  <= '0;
          end
        end
        default: begin  // ST_HALT
          if (irq_go) state <= ST_INTR;
        end
      endcase
    end
  end

  // Enable-interrupts bit.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)         eib <= 1'b0;
    else if (eib_wr) eib <= eib_new;
  end

  // Interrupt edge detection and latches; a new edge wins over a clear.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      irqa_s <= '0;
      irqb_s <= '0;
      irqa_l <= 1'b0;
      irqb_l <= 1'b0;
    end else begin
      irqa_s <= {irqa_s[1:0], irqa};
      irqb_s <= {irqb_s[1:0], irqb};
      if (irqa_s[1] && !irqa_s[2]) irqa_l <= 1'b1;
      else if (irqa_clr)           irqa_l <= 1'b0;
      if (irqb_s[1] && !irqb_s[2]) irqb_l <= 1'b1;
      else if (irqb_clr)           irqb_l <= 1'b0;
    end
  end

endmodule
