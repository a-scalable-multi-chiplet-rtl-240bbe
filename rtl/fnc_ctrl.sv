// fnc_ctrl: instruction controller of one Flexible Neural Core.
//
// Runs one 64-bit instruction at a time (encodings in accel_pkg):
//   LOADL1 : reads cnt LLC words from src and multicasts word i into
//            L1[dst+i] of every PE in mask, one word per cycle.
//   CONV   : sets the precision and weight-buffer mode, then issues k steps;
//            step i reads weight row wa+i (each PE group from its own banks)
//            and activation vector l1a+i (each PE from its own L1), one step
//            per cycle. After the pipeline drains it writes every PE's
//            post-processed results to the LLC, PE p at dst + p*n_words.
//   ELTW, POOL, SCALE : for i < cnt, dst[i] = f(src0[i], src1[i]) on the LLC
//            through the element-wise, pooling or scaling unit, three cycles
//            per word (read, read, write); SCALE uses src1[7:0] as its
//            multiplier and reads no second operand.
// start is taken only when busy is low; done pulses for one cycle at the end.
// busy stays high after start for k + 4 + 8*n_words cycles for CONV,
// cnt + 2 for LOADL1 and 3*cnt + 1 for the vector instructions.
// The design only names the controller; instruction set, encodings and the
// schedule are this implementation's choices.
module fnc_ctrl
  import accel_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [63:0]        instr,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // LLC port B
  output logic               b_en,
  output logic               b_we,
  output logic [14:0]        b_addr,
  output logic [63:0]        b_wdata,
  input  logic [63:0]        b_rdata,
  // interconnect
  output logic               sc_valid,
  output logic [NPE-1:0]     sc_mask,
  output logic [9:0]         sc_addr,
  output logic [2:0]         g_pe,
  output logic [1:0]         g_word,
  input  logic [63:0]        g_data,
  // weight buffer and PEs
  output wb_mode_e           wb_mode,
  output logic               wb_re,
  output logic [9:0]         wb_raddr,
  output prec_e              prec,
  output logic [4:0]         shift,
  output logic               relu,
  output logic               step_issue,
  output logic               step_first,
  output logic [9:0]         l1_raddr,
  input  logic [2:0]         n_words,
  // vector units
  output logic [63:0]        va,
  output logic [63:0]        vb,
  output logic [7:0]         vmult,
  output logic [3:0]         vshift,
  input  logic [63:0]        y_eltw,
  input  logic [63:0]        y_pool,
  input  logic [63:0]        y_scale
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_CONV, S_DRAIN, S_WB, S_VRDA, S_VRDB, S_VWR, S_DONE
  } state_e;

  state_e      st;
  logic [63:0] ins;
  ins_load_t   il;
  ins_conv_t   ic;
  ins_vec_t    iv;
  assign il = ins_load_t'(ins);
  assign ic = ins_conv_t'(ins);
  assign iv = ins_vec_t'(ins);
  ins_conv_t   ic_in;
  assign ic_in = ins_conv_t'(instr);

  logic [10:0] cnt;        // issued reads / steps / elements
  logic        rd_v;       // LOADL1: LLC read data valid this cycle
  logic [9:0]  rd_dst;
  logic [1:0]  drain;
  logic [3:0]  wb_p;       // write-back PE index
  logic [1:0]  wb_w;       // write-back word index
  logic [14:0] wb_a;       // write-back address
  logic [63:0] va_q;

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      ins     <= '0;
      cnt     <= '0;
      rd_v    <= 1'b0;
      rd_dst  <= '0;
      drain   <= '0;
      wb_p    <= '0;
      wb_w    <= '0;
      wb_a    <= '0;
      va_q    <= '0;
      prec    <= PREC_A8W8;
      wb_mode <= WB_UMA;
      shift   <= '0;
      relu    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_v <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          ins <= instr;
          cnt <= '0;
          unique case (op_e'(instr[63:60]))
            OP_LOADL1: st <= S_LOAD;
            OP_CONV: begin
              st      <= S_CONV;
              prec    <= ic_in.prec;
              wb_mode <= ic_in.wbmode;
              shift   <= ic_in.shift;
              relu    <= ic_in.relu;
            end
            OP_ELTW, OP_POOL, OP_SCALE: st <= S_VRDA;
            default: st <= S_DONE;
          endcase
        end
        S_LOAD: begin
          if (cnt < il.cnt) begin
            cnt    <= cnt + 1'b1;
            rd_v   <= 1'b1;
            rd_dst <= il.dst + 10'(cnt);
          end else if (!rd_v) begin
            st <= S_DONE;
          end
        end
        S_CONV: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= ic.k) begin
            st    <= S_DRAIN;
            drain <= 2'd3;
          end
        end
        S_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 2'd1) begin
            st   <= S_WB;
            wb_p <= '0;
            wb_w <= '0;
            wb_a <= ic.dst;
          end
        end
        S_WB: begin
          wb_a <= wb_a + 1'b1;
          if (3'(wb_w) + 3'd1 >= n_words) begin
            wb_w <= '0;
            wb_p <= wb_p + 1'b1;
            if (wb_p == 4'(NPE - 1)) st <= S_DONE;
          end else begin
            wb_w <= wb_w + 1'b1;
          end
        end
        S_VRDA: st <= S_VRDB;
        S_VRDB: begin
          va_q <= b_rdata;
          st   <= S_VWR;
        end
        S_VWR: begin
          cnt <= cnt + 1'b1;
          st  <= (cnt + 1'b1 >= iv.cnt) ? S_DONE : S_VRDA;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- combinational outputs ----------------
  always_comb begin
    b_en       = 1'b0;
    b_we       = 1'b0;
    b_addr     = '0;
    b_wdata    = '0;
    wb_re      = 1'b0;
    wb_raddr   = '0;
    step_issue = 1'b0;
    step_first = 1'b0;
    l1_raddr   = '0;
    g_pe       = wb_p[2:0];
    g_word     = wb_w;
    unique case (st)
      S_LOAD: if (cnt < il.cnt) begin
        b_en   = 1'b1;
        b_addr = il.src + 15'(cnt);
      end
      S_CONV: begin
        wb_re      = 1'b1;
        wb_raddr   = ic.wa + 10'(cnt);
        step_issue = 1'b1;
        step_first = (cnt == 0);
        l1_raddr   = ic.l1a + 10'(cnt);
      end
      S_WB: begin
        b_en    = 1'b1;
        b_we    = 1'b1;
        b_addr  = wb_a;
        b_wdata = g_data;
      end
      S_VRDA: begin
        b_en   = 1'b1;
        b_addr = iv.src0 + 15'(cnt);
      end
      S_VRDB: begin
        b_en   = (op_e'(iv.op) != OP_SCALE);
        b_addr = iv.src1 + 15'(cnt);
      end
      S_VWR: begin
        b_en    = 1'b1;
        b_we    = 1'b1;
        b_addr  = iv.dst + 15'(cnt);
        unique case (op_e'(iv.op))
          OP_ELTW: b_wdata = y_eltw;
          OP_POOL: b_wdata = y_pool;
          default: b_wdata = y_scale;
        endcase
      end
      default: ;
    endcase
  end

  assign sc_valid = rd_v;
  assign sc_mask  = il.mask;
  assign sc_addr  = rd_dst;
  assign va       = va_q;
  assign vb       = b_rdata;
  assign vmult    = iv.src1[7:0];
  assign vshift   = iv.shift;
endmodule
