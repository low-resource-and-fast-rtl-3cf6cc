// bec_controller: program sequencer of the point multiplier.
//
// Fetches the instruction at pc from the ROM and executes it by driving the
// register file selects (read_sel, write_sel, we, s_t0, s_t1) and the field
// arithmetic unit selects (s1, s2). Cycle budget per instruction, as in the
// paper: ADD, SQ and SWAP take 3 cycles (load Z, combine, write), MULT takes M
// cycles (T0 and T1 rotate, Z accumulates). Control words (LOOP, ENDLOOP,
// REPEAT, CALL, RET, HALT; see bec_pkg) take one cycle each; the paper does not
// count such cycles, so a run here is longer than its totals by the number of
// control words executed.
//
// MULT has no cycle of its own to write its result: the write happens in the
// next cycle, while the following instruction does its first step. If that
// step reads the register being written, the controller holds Z instead
// (s1 = 2, s2 = 1), which already carries the product. This forwarding is this
// design's own; it is what lets a product be used at once at the paper's
// latency of M cycles. Two MULTs back to back would collide and are never
// issued by the program (asserted).
//
// Key bits: the key is never stored. Each ladder step starts with KSWAP1,
// whose first cycle raises key_req for one clock and samples k_i at that
// clock edge (the master must drive the next key bit, most significant first,
// while key_req is high). KSWAP1 swaps T0/T1 when the bit is 1 and KSWAP0 at the
// end of the step swaps them when it is 0; otherwise each swaps T0 with itself,
// so every step takes the same time whatever the key.
//
// start (one cycle, while idle) runs the program from address 0; done goes high
// at HALT and stays high until the next start. Reset is synchronous, active low.
module bec_controller
  import bec_pkg::*;
#(
  parameter int M = 283
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            k_i,
  output logic            key_req,
  output logic            done,
  output logic [PC_W-1:0] pc,
  input  logic [9:0]      instr,
  output logic            s_t0,
  output logic            s_t1,
  output logic            we,
  output logic [3:0]      write_sel,
  output logic [3:0]      read_sel,
  output logic [1:0]      s1,
  output logic [1:0]      s2
);

  localparam int CW = $clog2(M + 1);

  typedef enum logic {ST_IDLE, ST_RUN} state_e;

  function automatic logic [NCNT-1:0][15:0] count_table();
    logic [NCNT-1:0][15:0] t;
    for (int i = 0; i < NCNT; i++) t[i] = 16'(loop_count(M, i));
    return t;
  endfunction
  localparam logic [NCNT-1:0][15:0] CNT = count_table();

  state_e          state;
  logic [CW-1:0]   cyc;
  logic [15:0]     lcnt, rcnt;
  logic [PC_W-1:0] lpc, ret;
  logic            kbit, wb_pending;
  logic [3:0]      wb_dst;

  instr_t ins;
  assign ins = instr_t'(instr);

  logic is_ctrl, is_kswap, swap_cond, last, is_op;
  logic [3:0] ra, rb;

  always_comb begin
    is_ctrl  = (ins.op == OP_SWAP) && (ins.src >= REPEAT_SRC);
    is_kswap = (ins.op == OP_SWAP) && (ins.src == CTRL_SRC) &&
               (ins.dst == C_KSWAP1 || ins.dst == C_KSWAP0);
    is_op    = !is_ctrl || is_kswap;
    // KSWAP1 uses the bit sampled in its first cycle (kbit after that edge)
    swap_cond = (ins.dst == C_KSWAP1) ? kbit : !kbit;
    ra = is_kswap ? 4'(REG_T0) : ins.src;
    rb = is_kswap ? (swap_cond ? 4'(REG_T1) : 4'(REG_T0)) : ins.dst;
    last = (ins.op == OP_MULT) ? (cyc == CW'(M - 1)) : (cyc == CW'(2));
  end

  // datapath selects
  always_comb begin
    s1        = 2'd2;      // default: Z holds (0 ^ Z)
    s2        = 2'd1;
    s_t0      = 1'b0;
    s_t1      = 1'b0;
    we        = wb_pending;
    write_sel = wb_dst;
    read_sel  = ra;
    key_req   = 1'b0;
    if (state == ST_RUN && is_op) begin
      if (ins.op == OP_MULT) begin
        s1   = 2'd0;
        s2   = (cyc == '0) ? 2'd0 : 2'd2;
        s_t0 = 1'b1;
        s_t1 = 1'b1;
      end else begin
        unique case (cyc)
          CW'(0): begin
            key_req = is_kswap && (ins.dst == C_KSWAP1);
            if (!(wb_pending && wb_dst == ra)) begin
              s1 = 2'd1;
              s2 = 2'd0;
            end
          end
          CW'(1): begin
            read_sel = rb;
            if (ins.op == OP_ADD) begin
              s1 = 2'd1;
              s2 = 2'd1;
            end else if (ins.op == OP_SQ) begin
              s1 = 2'd2;
              s2 = 2'd2;
            end else begin            // SWAP: b <= Z (old a), Z <= b
              s1        = 2'd1;
              s2        = 2'd0;
              we        = 1'b1;
              write_sel = rb;
            end
          end
          default: begin
            we        = 1'b1;
            write_sel = (ins.op == OP_SWAP) ? ra : rb;
          end
        endcase
      end
    end
  end


  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      pc         <= '0;
      cyc        <= '0;
      lcnt       <= '0;
      rcnt       <= '0;
      lpc        <= '0;
      ret        <= '0;
      kbit       <= 1'b0;
      wb_pending <= 1'b0;
      wb_dst     <= '0;
      done       <= 1'b0;
    end else begin
      wb_pending <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            state <= ST_RUN;
            pc    <= '0;
            cyc   <= '0;
            rcnt  <= '0;
            done  <= 1'b0;
          end
        end
        default: begin
          if (is_op) begin
            if (key_req) kbit <= k_i;
            if (last) begin
              cyc <= '0;
              if (ins.op == OP_MULT) begin
                wb_pending <= 1'b1;
                wb_dst     <= ins.dst;
              end
              if (rcnt > 16'd1) begin
                rcnt <= rcnt - 16'd1;
              end else begin
                rcnt <= '0;
                pc   <= pc + 1'b1;
              end
            end else begin
              cyc <= cyc + 1'b1;
            end
          end else if (ins.src == LOOP_SRC) begin
            lcnt <= CNT[ins.dst];
            lpc  <= pc + 1'b1;
            pc   <= pc + 1'b1;
          end else if (ins.src == REPEAT_SRC) begin
            rcnt <= CNT[ins.dst];
            pc   <= pc + 1'b1;
          end else begin
            unique case (ins.dst)
              C_ENDLOOP: begin
                if (lcnt > 16'd1) begin
                  lcnt <= lcnt - 16'd1;
                  pc   <= lpc;
                end else begin
                  lcnt <= '0;
                  pc   <= pc + 1'b1;
                end
              end
              C_CALL_INV: begin
                ret <= pc + 1'b1;
                pc  <= PC_W'(INV_ADDR);
              end
              C_CALL_HT: begin
                ret <= pc + 1'b1;
                pc  <= PC_W'(HT_ADDR);
              end
              C_RET: pc <= ret;
              default: begin            // HALT (and unused codes)
                state <= ST_IDLE;
                done  <= 1'b1;
              end
            endcase
          end
        end
      endcase
    end
  end

  // a MULT must not start while the previous MULT's result is still pending
  always_ff @(posedge clk) begin
    if (rst_n && state == ST_RUN && is_op && ins.op == OP_MULT && cyc == '0)
      assert (!wb_pending) else $error("bec_controller: MULT directly after MULT");
  end

endmodule
