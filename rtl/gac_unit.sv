// gac_unit: Generator-Analyzer-Controller of the ANoC-TEST architecture.
//
// The unit runs one test session each time 'start' is pulsed:
//   1. CONFIG : raises test_enable (it stays high until reset) and sends
//               cfg_len instruction words, cfg_word[0] first, on the
//               configuration channel, obeying Send/Accept. The words the
//               chain pushes out at its far end come back on the return
//               channel and are stored in readback[] in arrival order, so the
//               host can check the configuration that was there before.
//   2. UPDATE : pulses inst_update for one cycle. Every TCM still in the chain
//               copies its new word into its updated instruction register.
//   3. RUN    : the generator sends num_vec test flits on virtual channel
//               vec_vc, one per cycle while the network accepts. The analyzer
//               accepts every result flit on the TAM input and compares it
//               with the same sequence, which it generates again itself.
//               err_count counts flits whose data or VC differ. rx_count counts
//               received flits. 'cycles' is the time from the first flit sent
//               to the last flit received.
//   4. DONE   : 'done' pulses when num_vec results have arrived (immediately
//               after UPDATE when num_vec is 0, a configuration-only session).
// Test flit n has payload bits [31:0] = state n of a 32-bit Galois LFSR
// (x^32 + x^22 + x^2 + x + 1) started from 'seed'. Bit 33 marks the first flit
// and bit 32 the last.
//
// The reference defines the unit's roles: generate vectors, analyze results,
// drive the configuration channel and its update strobe from a state machine,
// and read the configuration back. The vector source (an LFSR), the
// comparison against the sent sequence and the host interface are this
// design's own choices.
module gac_unit
  import anoc_test_pkg::*;
#(
  parameter int unsigned NW    = 4,    // TCMs in the configuration chain
  parameter int unsigned CNT_W = 16    // width of vector counters
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host side (Test I/O)
  input  logic                    start,
  input  logic [$clog2(NW+1)-1:0] cfg_len,
  input  instr_t                  cfg_word  [NW],
  input  logic [CNT_W-1:0]        num_vec,
  input  logic [$clog2(NVC)-1:0]  vec_vc,
  input  logic [31:0]             seed,
  output logic                    busy,
  output logic                    done,
  output logic [CNT_W-1:0]        err_count,
  output logic [CNT_W-1:0]        rx_count,
  output logic [31:0]             cycles,
  output instr_t                  readback  [NW],
  output logic [$clog2(NW+1)-1:0] readback_len,
  // configuration channel
  output logic                    test_enable,
  output logic                    inst_update,
  output instr_t                  ctl_out_data,
  output logic                    ctl_out_send,
  input  logic                    ctl_out_accept,
  input  instr_t                  ctl_ret_data,
  input  logic                    ctl_ret_send,
  output logic                    ctl_ret_accept,
  // test access: vectors out, results in
  output sa_fwd_t                 tam_out_fwd,
  input  vc_t                     tam_out_accept,
  input  sa_fwd_t                 tam_in_fwd,
  output vc_t                     tam_in_accept
);

  typedef enum logic [2:0] {S_IDLE, S_CONFIG, S_UPDATE, S_RUN} state_e;

  localparam int unsigned LEN_W = $clog2(NW + 1);
  localparam int unsigned IDX_W = (NW > 1) ? $clog2(NW) : 1;

  state_e           state;
  logic [LEN_W-1:0] cfg_idx;
  logic             ctl_acc_q;
  vc_t              tam_acc_q;
  logic [CNT_W-1:0] tx_count;
  logic [31:0]      gen_lfsr, chk_lfsr;
  logic             timing;

  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    // Galois form of x^32 + x^22 + x^2 + x + 1
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  function automatic flit_t make_flit(input logic [31:0] payload,
                                      input logic [CNT_W-1:0] idx,
                                      input logic [CNT_W-1:0] n);
    return {idx == '0, idx == n - 1'b1, payload};
  endfunction

  logic  gen_fire, chk_fire;
  flit_t exp_flit;
  vc_t   vc_onehot;

  assign vc_onehot = vc_t'(1) << vec_vc;
  assign busy      = (state != S_IDLE);

  // configuration channel
  assign ctl_out_data   = (cfg_idx < LEN_W'(NW)) ? cfg_word[IDX_W'(cfg_idx)] : '0;
  assign ctl_out_send   = (state == S_CONFIG) && (cfg_idx < cfg_len) && ctl_acc_q;
  assign ctl_ret_accept = 1'b1;
  assign inst_update    = (state == S_UPDATE);

  // generator
  assign gen_fire          = (state == S_RUN) && (tx_count < num_vec) && |(tam_acc_q & vc_onehot);
  assign tam_out_fwd.send  = gen_fire ? vc_onehot : '0;
  assign tam_out_fwd.data  = make_flit(gen_lfsr, tx_count, num_vec);

  // analyzer: always ready, takes whatever arrives
  assign tam_in_accept = '1;
  assign chk_fire      = (tam_in_fwd.send != '0);
  assign exp_flit      = make_flit(chk_lfsr, rx_count, num_vec);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cfg_idx      <= '0;
      ctl_acc_q    <= 1'b0;
      tam_acc_q    <= '0;
      test_enable  <= 1'b0;
      done         <= 1'b0;
      tx_count     <= '0;
      rx_count     <= '0;
      err_count    <= '0;
      cycles       <= '0;
      timing       <= 1'b0;
      gen_lfsr     <= '0;
      chk_lfsr     <= '0;
      readback_len <= '0;
      for (int i = 0; i < NW; i++) readback[i] <= '0;
    end else begin
      ctl_acc_q <= ctl_out_accept;
      tam_acc_q <= tam_out_accept;
      done      <= 1'b0;

      // configuration read-back, stored in arrival order
      if (ctl_ret_send && readback_len < LEN_W'(NW)) begin
        readback[IDX_W'(readback_len)] <= ctl_ret_data;
        readback_len           <= readback_len + 1'b1;
      end

      if (timing) cycles <= cycles + 1'b1;

      unique case (state)
        S_IDLE: if (start) begin
          state        <= S_CONFIG;
          test_enable  <= 1'b1;
          cfg_idx      <= '0;
          readback_len <= '0;
          tx_count     <= '0;
          rx_count     <= '0;
          err_count    <= '0;
          cycles       <= '0;
          gen_lfsr     <= seed;
          chk_lfsr     <= seed;
        end
        S_CONFIG: begin
          if (ctl_out_send) cfg_idx <= cfg_idx + 1'b1;
          if (cfg_idx >= cfg_len) state <= S_UPDATE;
        end
        S_UPDATE: begin
          state <= S_RUN;
        end
        S_RUN: begin
          if (gen_fire) begin
            tx_count <= tx_count + 1'b1;
            gen_lfsr <= lfsr_next(gen_lfsr);
            if (tx_count == '0) timing <= 1'b1;
          end
          if (chk_fire) begin
            rx_count <= rx_count + 1'b1;
            chk_lfsr <= lfsr_next(chk_lfsr);
            if (tam_in_fwd.data != exp_flit || tam_in_fwd.send != vc_onehot)
              err_count <= err_count + 1'b1;
          end
          if (rx_count == num_vec) begin
            state  <= S_IDLE;
            done   <= 1'b1;
            timing <= 1'b0;
          end else if (chk_fire && rx_count + 1'b1 == num_vec) begin
            timing <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
