// Scheduler of the state machine: sequences the A/D conversion cycle of the
// optical (imager) input and the S-CNN program cycle with its inner function
// evaluation loop, and drives the rows' synchronisation lines.
//
// A/D conversion cycle (start_adc): one cycle of photodiode reset,
// cfg.int_time cycles of integration, one sample-and-hold cycle (which arms
// the cells' A/D latches), then the digital ramp 0..2^DW-1, one value per
// cycle, on the row buses with sync.adc_ramp; the external analog ramp must
// follow dramp. The last value carries sync.adc_last.
//
// Program cycle (start_prog): the integration counters are cleared, then for
// every cycle-ramp value s = 0..2^DW-1:
//   ENC   1 cycle    s on the bus, enc_strobe: cells latch UPwm and XPwm
//   EVAL  256 cycles inner ramp r = 0..255 is read from the program memory
//   DRAIN 1 cycle    the memory's last broadcast reaches the cells
//   FOG   1 cycle    fog_strobe: counters add FoG(F(W_x), G(W_u))
// and finally one transfer cycle copies the counters into the state
// registers. A program cycle thus takes 2 + 259 * 2^DW cycles (66,306 at
// DW = 8). It is repeated cfg.iterations times (0 counts as 1). The eval_en
// line is not driven here: it is the program memory's broadcast-valid signal,
// one cycle behind mem_rd_en, and the load_u/load_x lines come from the I/O
// interface, so the scheduler leaves those three lines low.
//
// The order of phases and their cycle counts are this design's choice; the
// document gives only the loop structure (outer cycle ramp, inner ramp).
module scheduler
  import scnn_pkg::*;
#(
  parameter int DW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_prog,
  input  logic            start_adc,
  input  cfg_t            cfg,
  output sync_t           sync,
  output logic            drive_dramp,   // row buses carry dramp
  output logic [DW-1:0]   dramp,
  output logic            mem_rd_en,
  output logic [IR_W-1:0] mem_rd_addr,
  output logic            busy,
  output logic            done           // one-cycle pulse at the end of an operation
);
  typedef enum logic [3:0] {
    S_IDLE, S_ADC_RST, S_ADC_INT, S_ADC_SAMPLE, S_ADC_RAMP,
    S_PC_START, S_PC_ENC, S_PC_EVAL, S_PC_DRAIN, S_PC_FOG, S_PC_XFER
  } state_e;

  state_e    state, state_n;
  logic [7:0] int_cnt;
  logic [7:0] iter_left;

  logic           o_clear, o_step, o_last;
  logic           i_clear, i_step, i_last;
  logic [IR_W-1:0] i_value;

  ramp_gen #(.W(DW)) outer_ramp (
    .clk, .rst_n, .clear(o_clear), .step(o_step), .value(dramp), .last(o_last)
  );
  ramp_gen #(.W(IR_W)) inner_ramp (
    .clk, .rst_n, .clear(i_clear), .step(i_step), .value(i_value), .last(i_last)
  );

  always_comb begin
    state_n     = state;
    sync        = SYNC_IDLE;
    drive_dramp = 1'b0;
    mem_rd_en   = 1'b0;
    o_clear     = 1'b0;
    o_step      = 1'b0;
    i_clear     = 1'b0;
    i_step      = 1'b0;
    done        = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (start_prog)     state_n = S_PC_START;
        else if (start_adc) state_n = S_ADC_RST;
      end
      S_ADC_RST: begin
        sync.pd_reset = 1'b1;
        state_n = (cfg.int_time == '0) ? S_ADC_SAMPLE : S_ADC_INT;
      end
      S_ADC_INT: begin
        sync.pd_integrate = 1'b1;
        if (int_cnt == 8'd1) state_n = S_ADC_SAMPLE;
      end
      S_ADC_SAMPLE: begin
        sync.pd_sample = 1'b1;
        o_clear = 1'b1;
        state_n = S_ADC_RAMP;
      end
      S_ADC_RAMP: begin
        sync.adc_ramp = 1'b1;
        sync.adc_last = o_last;
        drive_dramp   = 1'b1;
        o_step        = 1'b1;
        if (o_last) begin
          state_n = S_IDLE;
          done    = 1'b1;
        end
      end
      S_PC_START: begin
        sync.cnt_clear = 1'b1;
        o_clear = 1'b1;
        state_n = S_PC_ENC;
      end
      S_PC_ENC: begin
        sync.enc_strobe = 1'b1;
        drive_dramp = 1'b1;
        i_clear = 1'b1;
        state_n = S_PC_EVAL;
      end
      S_PC_EVAL: begin
        mem_rd_en = 1'b1;
        i_step    = 1'b1;
        if (i_last) state_n = S_PC_DRAIN;
      end
      S_PC_DRAIN: state_n = S_PC_FOG;
      S_PC_FOG: begin
        sync.fog_strobe = 1'b1;
        o_step = 1'b1;
        state_n = o_last ? S_PC_XFER : S_PC_ENC;
      end
      S_PC_XFER: begin
        sync.transfer = 1'b1;
        if (iter_left <= 8'd1) begin
          state_n = S_IDLE;
          done    = 1'b1;
        end else begin
          state_n = S_PC_START;
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      int_cnt   <= '0;
      iter_left <= '0;
    end else begin
      state <= state_n;
      if (state == S_ADC_RST)      int_cnt <= cfg.int_time;
      else if (state == S_ADC_INT) int_cnt <= int_cnt - 1'b1;
      if (state == S_IDLE && start_prog) iter_left <= cfg.iterations;
      else if (state == S_PC_XFER)       iter_left <= iter_left - 1'b1;
    end
  end

  assign mem_rd_addr = i_value;
  assign busy        = (state != S_IDLE);

  // A start request is only honoured while idle.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(start_prog && start_adc));
  end
endmodule
