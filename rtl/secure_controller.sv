// secure_controller: the only path by which an NPU core's secure context is
// changed.
//
// It takes configuration commands from the CPU side. Each command carries a
// 'secure' flag telling whether a secure-world CPU issued it. Following the
// design description, the core's ID state, the checking registers and the
// scratchpad reset ("secure to non-secure") can only be set by the secure
// world. Translation registers may also be written by the normal world, but
// only while the core itself is normal; a secure core's translation is
// owned by the secure world. That last rule is this design's reading. A
// refused command changes nothing and completes with done_err = 1.
//
// CMD_SPAD_CLR walks a range of scratchpad lines (a0 = first, a1 = count),
// one clear request per accepted cycle, with the secure ID. A clear of zero
// lines completes at once.
//
// Interface: cmd_valid/cmd_ready. Register commands take one cycle: done is
// pulsed the cycle after acceptance. A clear is done the cycle after the
// response to its last line. cmd_ready stays low while a clear runs. The
// ID state resets to normal.
//
// Most output bits are command fields wired straight to the register
// write ports (xlat_wval, chk_wval), and clear requests carry constant
// zero data; only the enables, the ID state and the clear walk are logic.
module secure_controller
  import snpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  cmd_t        cmd,
  output logic        done,
  output logic        done_err,
  output id_e         core_id,
  // NPU Guarder configuration
  output logic        xlat_we,
  output logic [3:0]  xlat_idx,
  output xlat_reg_t   xlat_wval,
  output logic        chk_we,
  output logic [3:0]  chk_idx,
  output chk_reg_t    chk_wval,
  // scratchpad port for clears
  output logic        spad_valid,
  input  logic        spad_ready,
  output spad_req_t   spad_req,
  input  logic        spad_rsp_valid
);
  typedef enum logic [1:0] {S_IDLE, S_CLR, S_CLR_WAIT} state_e;
  state_e state_q;

  logic [SPAD_AW-1:0] clr_addr_q;
  logic [LEN_W-1:0]   clr_left_q;

  logic accept, allowed;

  assign cmd_ready = (state_q == S_IDLE);
  assign accept    = cmd_valid && cmd_ready;

  always_comb begin
    unique case (cmd.op)
      CMD_SET_XLAT: allowed = cmd.secure || (core_id == ID_NORMAL);
      default:      allowed = cmd.secure;
    endcase
  end

  // Guarder register writes are combinational from the accepted command.
  assign xlat_we   = accept && allowed && (cmd.op == CMD_SET_XLAT);
  assign xlat_idx  = cmd.idx;
  assign xlat_wval = '{en: cmd.en, va: cmd.a0, pa: cmd.a1, size: cmd.a2};
  assign chk_we    = accept && allowed && (cmd.op == CMD_SET_CHK);
  assign chk_idx   = cmd.idx;
  assign chk_wval  = '{en: cmd.en, base: cmd.a0, size: cmd.a1, perm: cmd.perm};

  assign spad_valid     = (state_q == S_CLR);
  assign spad_req.we    = 1'b0;
  assign spad_req.clr   = 1'b1;
  assign spad_req.id    = ID_SECURE;
  assign spad_req.addr  = clr_addr_q;
  assign spad_req.wdata = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      core_id    <= ID_NORMAL;
      clr_addr_q <= '0;
      clr_left_q <= '0;
      done       <= 1'b0;
      done_err   <= 1'b0;
    end else begin
      done     <= 1'b0;
      done_err <= 1'b0;
      unique case (state_q)
        S_IDLE: if (accept) begin
          if (!allowed) begin
            done     <= 1'b1;
            done_err <= 1'b1;
          end else if (cmd.op == CMD_SPAD_CLR && cmd.a1[LEN_W-1:0] != '0) begin
            clr_addr_q <= cmd.a0[SPAD_AW-1:0];
            clr_left_q <= cmd.a1[LEN_W-1:0];
            state_q    <= S_CLR;
          end else begin
            if (cmd.op == CMD_SET_ID) core_id <= id_e'(cmd.a0[0]);
            done <= 1'b1;
          end
        end
        S_CLR: if (spad_ready) begin
          clr_addr_q <= clr_addr_q + 1'b1;
          clr_left_q <= clr_left_q - 1'b1;
          if (clr_left_q == LEN_W'(1)) state_q <= S_CLR_WAIT;
        end
        S_CLR_WAIT: if (spad_rsp_valid) begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
