// pea_ctrl: nested control FSM of the accelerator; one firing processes one
// instruction.
//
// States and transitions:
//   IDLE      wait for invoke from the outer firing FSM
//   FETCH     dequeue the instruction word and latch opcode, CV address A
//             and operand (N for STP, b for EVB)
//   DECODE    check the instruction and branch on the opcode
//   STP_LOAD  move coefficients c[0..N] from the data FIFO into CV[A], one per
//             cycle while data is present; then mark CV[A] valid with degree N
//   EVP_EXEC  hand one argument x to the core and latch P_A(x)
//   EVB_EXEC  stream b arguments through the core; every result goes straight
//             to the output FIFOs with status OK; leave after the b-th
//   RST_EXEC  clear all CV valid flags; produces no output
//   OUTPUT    wait until neither output FIFO is full, write result and status
// These states, their order and their actions follow the accelerator's state
// table and transition diagram.
//
// This design's own choices, where the definition is silent:
//  - Error checks sit in DECODE: STP with N > 10 gives ST_ERR_DEGREE, EVB with
//    b = 0 gives ST_ERR_BLOCK, EVP/EVB on a CV that is not valid gives
//    ST_ERR_UNINIT. A failing instruction consumes no data words and writes
//    one result word 0 with its status code.
//  - STP writes result 0 with status ST_OK when it completes.
//  - EVB writes its results from EVB_EXEC rather than passing through OUTPUT
//    for each one, so that pipelined cores can accept a new argument while
//    earlier results are being written; argument issue and result collection
//    run independently there.
// Interface: plain FIFO-side signals (first-word fall-through read data, empty
// and full flags), the CV store's ports, and the common core handshake (see
// pea_core_horner). done is high in the cycle that returns to IDLE.
module pea_ctrl
  import pea_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // outer FSM
  input  logic            invoke,
  output logic            done,
  // control FIFO
  input  logic            ctrl_empty,
  input  logic [INSTR_W-1:0] ctrl_rdata,
  output logic            ctrl_rd,
  // data FIFO
  input  logic            data_empty,
  input  data_t           data_rdata,
  output logic            data_rd,
  // result and status FIFOs
  input  logic            res_full,
  output logic            res_wr,
  output res_t            res_wdata,
  input  logic            st_full,
  output logic            st_wr,
  output status_e         st_wdata,
  // coefficient vector store
  output cv_addr_t        cv_addr,
  output logic            cv_wr_en,
  output deg_t            cv_wr_idx,
  output data_t           cv_wr_data,
  output logic            cv_set_valid,
  output deg_t            cv_set_degree,
  output logic            cv_clear_all,
  input  logic            cv_valid,
  // evaluation core
  output logic            core_in_valid,
  input  logic            core_in_ready,
  output data_t           core_in_x,
  output logic            core_in_last,
  input  logic            core_out_valid,
  output logic            core_out_ready,
  input  res_t            core_out_result
);
  typedef enum logic [2:0] {
    IDLE, FETCH, DECODE, STP_LOAD, EVP_EXEC, EVB_EXEC, RST_EXEC, OUTPUT
  } state_e;

  state_e         state;
  instr_t         instr;
  logic [OPND_W:0] cnt;     // STP: coefficient count; EVB/EVP: arguments issued
  logic [OPND_W:0] blk_cnt; // EVB: results written
  res_t           result_q;
  status_e        status_q;

  logic out_space, issue, collect;
  logic [OPND_W:0] n_words;  // STP: N+1; EVB: b; EVP: 1

  assign out_space = !res_full && !st_full;
  always_comb begin
    unique case (instr.opcode)
      OP_STP:  n_words = (OPND_W+1)'(instr.operand) + 1'b1;
      OP_EVB:  n_words = (OPND_W+1)'(instr.operand);
      default: n_words = (OPND_W+1)'(1);
    endcase
  end

  // Combinational actions of the current state.
  always_comb begin
    ctrl_rd        = (state == FETCH);
    cv_addr        = instr.addr;
    cv_wr_en       = (state == STP_LOAD) && (cnt < n_words) && !data_empty;
    cv_wr_idx      = deg_t'(cnt);
    cv_wr_data     = data_rdata;
    cv_set_valid   = (state == STP_LOAD) && (cnt == n_words);
    cv_set_degree  = deg_t'(instr.operand);
    cv_clear_all   = (state == RST_EXEC);
    core_in_valid  = ((state == EVP_EXEC) || (state == EVB_EXEC)) && (cnt < n_words) && !data_empty;
    core_in_x      = data_rdata;
    core_in_last   = (cnt + 1'b1 == n_words);
    issue          = core_in_valid && core_in_ready;
    core_out_ready = (state == EVP_EXEC) || ((state == EVB_EXEC) && out_space);
    collect        = core_out_valid && core_out_ready;
    data_rd        = cv_wr_en || issue;
    res_wr         = ((state == OUTPUT) && out_space) || ((state == EVB_EXEC) && collect);
    st_wr          = res_wr;
    res_wdata      = (state == EVB_EXEC) ? core_out_result : result_q;
    st_wdata       = (state == EVB_EXEC) ? ST_OK : status_q;
    done           = (state == RST_EXEC) || ((state == OUTPUT) && out_space) ||
                     ((state == EVB_EXEC) && collect && (blk_cnt + 1'b1 == n_words));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      instr    <= '0;
      cnt      <= '0;
      blk_cnt  <= '0;
      result_q <= '0;
      status_q <= ST_OK;
    end else begin
      if (data_rd) cnt <= cnt + 1'b1;
      unique case (state)
        IDLE: if (invoke && !ctrl_empty) state <= FETCH;
        FETCH: begin
          instr <= instr_t'(ctrl_rdata);
          state <= DECODE;
        end
        DECODE: begin
          cnt      <= '0;
          blk_cnt  <= '0;
          result_q <= '0;
          status_q <= ST_OK;
          unique case (instr.opcode)
            OP_STP: begin
              if (instr.operand > operand_t'(MAX_DEG)) begin
                status_q <= ST_ERR_DEGREE;
                state    <= OUTPUT;
              end else begin
                state <= STP_LOAD;
              end
            end
            OP_EVP: begin
              if (!cv_valid) begin
                status_q <= ST_ERR_UNINIT;
                state    <= OUTPUT;
              end else begin
                state <= EVP_EXEC;
              end
            end
            OP_EVB: begin
              if (instr.operand == '0) begin
                status_q <= ST_ERR_BLOCK;
                state    <= OUTPUT;
              end else if (!cv_valid) begin
                status_q <= ST_ERR_UNINIT;
                state    <= OUTPUT;
              end else begin
                state <= EVB_EXEC;
              end
            end
            default: state <= RST_EXEC;
          endcase
        end
        STP_LOAD: if (cnt == n_words) state <= OUTPUT;
        EVP_EXEC: if (core_out_valid) begin
          result_q <= core_out_result;
          state    <= OUTPUT;
        end
        EVB_EXEC: if (collect) begin
          blk_cnt <= blk_cnt + 1'b1;
          if (blk_cnt + 1'b1 == n_words) state <= IDLE;
        end
        RST_EXEC: state <= IDLE;
        OUTPUT:   if (out_space) state <= IDLE;
        default:  state <= IDLE;
      endcase
    end
  end

  a_no_result_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                         res_wr |-> !res_full && !st_full)
    else $error("pea_ctrl: output FIFO written while full");
  a_no_data_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                        data_rd |-> !data_empty)
    else $error("pea_ctrl: data FIFO read while empty");
  a_no_ctrl_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                        ctrl_rd |-> !ctrl_empty)
    else $error("pea_ctrl: control FIFO read while empty");
endmodule
