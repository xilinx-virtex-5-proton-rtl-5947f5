// cmd_decoder: decodes the host's 4-byte command words (opcode, D0, D1, D2)
// and holds the tester's settings.
//
// Bytes arrive from uart_rx. Four bytes form a cmd_word_t; on the fourth the
// opcode is acted on in the next cycle:
//   x01 Reset DUT         reset_dut pulse; scrub, readback and injection off
//   x02 Start Test        start_test pulse; D0[1:0] selects the D_SR pattern
//   xA0 Clock Frequency   clk_div <= D0 (ignored unless even and >= 2)
//   x81 Write Config Data the next CFG_LEN bytes are configuration data,
//                         output on cfg_wr_* with byte addresses 0,1,2...
//   x04 Start Config      start_config pulse
//   x06 Start Scrub       scrub_on set
//   x0E Inject Error On   inject_on set
//   x05 Start Readback    rdbk_on set (drives RUN_SCAN)
//   x79 / x7A             inj_low / inj_high <= {D0[3:0],D1,D2}
//   x7B End of Config     end_addr <= {D0[3:0],D1,D2}
//   x89 / x8A             ctl_reg / mask_reg <= {D2,D1,D0,byte 0}
// The opcodes, operand layouts and default injection range come from the
// test plan. Byte 0 of the control and mask registers is fixed in the tester;
// its value is not given, so CTL_BYTE0 / MASK_BYTE0 are parameters. The
// default end address (whole file), the default divider and the pattern
// field in D0 of Start Test are this design's choices. Unknown opcodes are
// ignored. cmd_valid pulses for every decoded word (for echo/monitoring).
module cmd_decoder
  import v5test_pkg::*;
#(
  parameter int unsigned CFG_LEN    = CFG_BYTES,
  parameter logic [7:0]  CTL_BYTE0  = 8'h00,
  parameter logic [7:0]  MASK_BYTE0 = 8'h00,
  parameter logic [7:0]  DIV_DEFAULT = 8'd2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            rx_data,
  input  logic                  rx_valid,
  // decoded word
  output cmd_word_t             cmd,
  output logic                  cmd_valid,
  // pulses
  output logic                  reset_dut,
  output logic                  start_test,
  output logic                  start_config,
  // settings
  output pattern_e              pattern,
  output logic [7:0]            clk_div,
  output logic                  scrub_on,
  output logic                  inject_on,
  output logic                  rdbk_on,
  output logic [CFG_ADDR_W-1:0] inj_low,
  output logic [CFG_ADDR_W-1:0] inj_high,
  output logic [CFG_ADDR_W-1:0] end_addr,
  output logic [31:0]           ctl_reg,
  output logic [31:0]           mask_reg,
  // configuration data stream
  output logic                  cfg_wr_valid,
  output logic [CFG_ADDR_W-1:0] cfg_wr_addr,
  output logic [7:0]            cfg_wr_data,
  output logic                  cfg_loading
);
  logic [1:0]            nbytes;
  cmd_word_t             word;
  logic [CFG_ADDR_W-1:0] cfg_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbytes       <= '0;
      word         <= '0;
      cmd          <= '0;
      cmd_valid    <= 1'b0;
      reset_dut    <= 1'b0;
      start_test   <= 1'b0;
      start_config <= 1'b0;
      pattern      <= PAT_ZERO;
      clk_div      <= DIV_DEFAULT;
      scrub_on     <= 1'b0;
      inject_on    <= 1'b0;
      rdbk_on      <= 1'b0;
      inj_low      <= INJ_LOW_DEFAULT;
      inj_high     <= INJ_HIGH_DEFAULT;
      end_addr     <= CFG_ADDR_W'(CFG_LEN - 1);
      ctl_reg      <= {24'h0, CTL_BYTE0};
      mask_reg     <= {24'h0, MASK_BYTE0};
      cfg_wr_valid <= 1'b0;
      cfg_wr_addr  <= '0;
      cfg_wr_data  <= '0;
      cfg_loading  <= 1'b0;
      cfg_cnt      <= '0;
    end else begin
      cmd_valid    <= 1'b0;
      reset_dut    <= 1'b0;
      start_test   <= 1'b0;
      start_config <= 1'b0;
      cfg_wr_valid <= 1'b0;

      if (cfg_loading) begin
        // configuration data phase of Write Configuration Data
        if (rx_valid) begin
          cfg_wr_valid <= 1'b1;
          cfg_wr_addr  <= cfg_cnt;
          cfg_wr_data  <= rx_data;
          cfg_cnt      <= cfg_cnt + 1'b1;
          if (cfg_cnt == CFG_ADDR_W'(CFG_LEN - 1)) cfg_loading <= 1'b0;
        end
      end else if (rx_valid) begin
        word   <= {word[23:0], rx_data};
        nbytes <= nbytes + 1'b1;
        if (nbytes == 2'd3) begin
          automatic cmd_word_t w = {word[23:0], rx_data};
          cmd       <= w;
          cmd_valid <= 1'b1;
          case (w.op)
            CMD_RESET_DUT: begin
              reset_dut <= 1'b1;
              scrub_on  <= 1'b0;
              inject_on <= 1'b0;
              rdbk_on   <= 1'b0;
            end
            CMD_START_TEST: begin
              start_test <= 1'b1;
              pattern    <= (w.d0[1:0] == 2'd3) ? PAT_CHECK : pattern_e'(w.d0[1:0]);
            end
            CMD_CLOCK_FREQ:   if (w.d0 >= 8'd2 && !w.d0[0]) clk_div <= w.d0;
            CMD_WRITE_CONFIG: begin
              cfg_loading <= 1'b1;
              cfg_cnt     <= '0;
            end
            CMD_START_CONFIG: start_config <= 1'b1;
            CMD_START_SCRUB:  scrub_on     <= 1'b1;
            CMD_INJECT_ON:    inject_on    <= 1'b1;
            CMD_START_RDBK:   rdbk_on      <= 1'b1;
            CMD_INJ_LOW:      inj_low      <= cmd_addr(w);
            CMD_INJ_HIGH:     inj_high     <= cmd_addr(w);
            CMD_END_CONFIG:   end_addr     <= cmd_addr(w);
            CMD_SET_CTL:      ctl_reg      <= {w.d2, w.d1, w.d0, CTL_BYTE0};
            CMD_SET_MASK:     mask_reg     <= {w.d2, w.d1, w.d0, MASK_BYTE0};
            default: ;
          endcase
        end
      end
    end
  end
endmodule
