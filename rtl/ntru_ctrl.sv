// ntru_ctrl: finite-state controller (the FSM half of the FSMD) of the
// NTRUEncrypt engine.
//
// It accepts one host command when ready is high and cmd_valid is sampled
// high, then steps through that command's phases, each a fixed number of
// clocks except the convolution, which lasts until the convolution unit
// reports done:
//   LOAD_H : LOGQ clocks, en_h        (public key h, bit-planes on din)
//   LOAD_F : LOGN+1 clocks, en_f      (private key f1 locations + signs)
//   ENC    : LOGN+1 clocks en_r, LOGP clocks en_m, 1 clock PREP,
//            convolution, then LOGQ output clocks
//   DEC    : LOGQ clocks en_e, 1 clock PREP, convolution, then LOGP output clocks
// PREP loads the convolution operand (h for ENC, e for DEC) and starts the
// convolution unit. The clock in which conv_done arrives captures the result
// (res_load), and the output phase drives dout_valid while shifting one
// bit-plane per clock.
// Accept-to-first-output latency is therefore (LOGN+1) + LOGP + T_conv + 3
// clocks for ENC and LOGQ + T_conv + 3 for DEC, T_conv being the convolution's
// clock count. The phase lengths follow the load and output budget of the
// architecture; PREP and the capture clock are this design's control overhead.
// Outputs are decoded from the registered state (Moore), except res_load.
module ntru_ctrl
  import ntru_pkg::*;
#(
  parameter int unsigned LOGQ = 7,
  parameter int unsigned LOGP = 2,
  parameter int unsigned LOGN = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  input  ntru_cmd_e cmd,
  output logic      ready,
  // load enables of the bit-plane input registers
  output logic      en_h,
  output logic      en_f,
  output logic      en_r,
  output logic      en_m,
  output logic      en_e,
  // convolution unit
  output logic      conv_load_b,
  output logic      conv_start,
  input  logic      conv_done,
  output logic      mode_dec,     // 1: operands/addend/output of decryption
  // result capture and output
  output logic      res_load,
  output logic      out_shift,
  output logic      dout_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_LD_H, S_LD_F, S_LD_R, S_LD_M, S_LD_E, S_PREP, S_CONV, S_OUT
  } state_e;

  localparam int unsigned CW = $clog2(LOGQ > LOGN + 1 ? LOGQ + 1 : LOGN + 2);

  state_e        state, state_n;
  logic [CW-1:0] cnt, cnt_n;
  logic          dec, dec_n;

  logic [CW-1:0] last_cnt;   // last count of the current timed phase

  always_comb begin
    unique case (state)
      S_LD_H, S_LD_E: last_cnt = CW'(LOGQ - 1);
      S_LD_F, S_LD_R: last_cnt = CW'(LOGN);
      S_LD_M:         last_cnt = CW'(LOGP - 1);
      S_OUT:          last_cnt = dec ? CW'(LOGP - 1) : CW'(LOGQ - 1);
      default:        last_cnt = '0;
    endcase
  end

  always_comb begin
    state_n = state;
    cnt_n   = cnt + 1'b1;
    dec_n   = dec;
    unique case (state)
      S_IDLE: begin
        cnt_n = '0;
        if (cmd_valid) begin
          unique case (cmd)
            CMD_LOAD_H: state_n = S_LD_H;
            CMD_LOAD_F: state_n = S_LD_F;
            CMD_ENC:    begin state_n = S_LD_R; dec_n = 1'b0; end
            CMD_DEC:    begin state_n = S_LD_E; dec_n = 1'b1; end
            default:    state_n = S_IDLE;
          endcase
        end
      end
      S_LD_H, S_LD_F:
        if (cnt == last_cnt) state_n = S_IDLE;
      S_LD_R:
        if (cnt == last_cnt) begin state_n = S_LD_M; cnt_n = '0; end
      S_LD_M, S_LD_E:
        if (cnt == last_cnt) state_n = S_PREP;
      S_PREP:
        state_n = S_CONV;
      S_CONV: begin
        cnt_n = '0;
        if (conv_done) state_n = S_OUT;
      end
      S_OUT:
        if (cnt == last_cnt) state_n = S_IDLE;
      default:
        state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      dec   <= 1'b0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
      dec   <= dec_n;
    end
  end

  assign ready       = (state == S_IDLE);
  assign en_h        = (state == S_LD_H);
  assign en_f        = (state == S_LD_F);
  assign en_r        = (state == S_LD_R);
  assign en_m        = (state == S_LD_M);
  assign en_e        = (state == S_LD_E);
  assign conv_load_b = (state == S_PREP);
  assign conv_start  = (state == S_PREP);
  assign mode_dec    = dec;
  assign res_load    = (state == S_CONV) && conv_done;
  assign out_shift   = (state == S_OUT);
  assign dout_valid  = (state == S_OUT);

  // conv_done may only arrive while a convolution is under way.
  a_done_in_conv : assert property (@(posedge clk) disable iff (!rst_n)
      conv_done |-> state == S_CONV)
    else $error("ntru_ctrl: conv_done outside the convolution phase");

endmodule
