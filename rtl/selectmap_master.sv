// selectmap_master: configures the DUT and scrubs its configuration memory
// through the 8-bit SelectMap port, with the tester as master and the DUT
// as slave. The data comes from the .bin file stored in the tester SRAM.
//
// CCLK is the tester clock divided by CCLK_DIV (default 5: 30 MHz from
// 150 MHz). A byte is placed on D together with CSI_B low and RDWR_B low on
// the falling edge of CCLK and the DUT takes it on the next rising edge. If
// BUSY is high at that rising edge the byte is held for another CCLK. Bytes
// are fetched from the SRAM read port into a prefetch register while the
// previous byte waits for its CCLK, so one byte moves per CCLK.
//
// Configure (start_config): PROG_B is pulsed low for PROG_CLKS clocks, the
// engine waits for INIT_B to go high, streams bytes 0..CFG_LEN-1, then keeps
// CCLK running with CSI_B high until DONE rises (config_done) or
// DONE_TIMEOUT clocks pass (cfg_error).
//
// Scrub (scrub_on, after a successful configuration): without touching
// PROG_B, passes are repeated back to back. Each pass writes a short command
// preamble - dummy word, sync word, a write of the 32-bit MASK register and
// a write of the 32-bit CTL0 register (the values set with commands x8A and
// x89) - and then bin-file bytes 0..end_addr, so the scrub stops before the
// BRAM area. With inject_on, one byte per pass whose address lies in
// [inj_low, inj_high] is written with bit 0 inverted; the address steps by
// INJ_STRIDE each pass and wraps inside the range. The next pass restores
// that byte, so the injected upset lives for one pass.
// scrub_req (a pulse, after a successful configuration) asks for a single
// pass even when scrub_on is low: the tester uses it when the DUT's own
// readback CRC reports an upset, so the whole configuration is rewritten.
//
// The configure flow, the 8-bit 30 MHz SelectMap, the end address, the
// injection range and the MASK/CTL registers follow the test plan. The
// preamble's packet words (0xAA995566 sync, type-1 writes 0x3000C001 to MASK
// and 0x3000A001 to CTL0) are Virtex-5 configuration-packet values that the
// test plan does not print; the preamble placement, BUSY handling, the
// injection walk and the timeouts are this design's choices. dut_reset (Reset
// DUT) returns the engine to idle and clears config_done.
module selectmap_master
  import v5test_pkg::*;
#(
  parameter int unsigned CFG_LEN      = CFG_BYTES,
  parameter int unsigned CCLK_DIV     = 5,
  parameter int unsigned PROG_CLKS    = 64,
  parameter int unsigned DONE_TIMEOUT = 65536,
  parameter int unsigned INJ_STRIDE   = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  dut_reset,
  input  logic                  start_config,
  input  logic                  scrub_on,
  input  logic                  scrub_req,
  input  logic                  inject_on,
  input  logic [CFG_ADDR_W-1:0] inj_low,
  input  logic [CFG_ADDR_W-1:0] inj_high,
  input  logic [CFG_ADDR_W-1:0] end_addr,
  input  logic [31:0]           ctl_reg,
  input  logic [31:0]           mask_reg,
  // SRAM read port
  output logic                  rd_req,
  output logic [CFG_ADDR_W-1:0] rd_addr,
  input  logic [7:0]            rd_data,
  input  logic                  rd_ack,
  // SelectMap pins
  output logic                  sm_cclk,
  output logic                  sm_csi_b,
  output logic                  sm_rdwr_b,
  output logic                  sm_prog_b,
  output logic [7:0]            sm_d,
  input  logic                  sm_init_b,
  input  logic                  sm_done,
  input  logic                  sm_busy,
  // status
  output logic                  config_done,
  output logic                  cfg_error,
  output logic                  scrubbing,
  output logic [31:0]           scrub_passes,
  output logic [31:0]           injections
);
  localparam int unsigned PRE_LEN = 24;
  localparam int unsigned HALF    = CCLK_DIV / 2;

  initial assert (CCLK_DIV >= 2) else $error("CCLK_DIV must be at least 2");

  typedef enum logic [2:0] {S_IDLE, S_PROG, S_WAIT_INIT, S_STREAM, S_WAIT_DONE, S_SCRUB_GAP} sstate_e;
  sstate_e state;

  logic [$clog2(CCLK_DIV)-1:0]     cc;
  logic                            rise, fall, cclk_run;
  logic [$clog2(DONE_TIMEOUT+PROG_CLKS+1)-1:0] tmr;
  logic [1:0]                      init_s, done_s;
  logic                            busy_q;
  // byte source
  logic                            scrub_pass;    // current stream is a scrub pass
  logic                            scrub_pend;    // one pass requested by scrub_req
  logic [4:0]                      pidx;          // preamble index
  logic [CFG_ADDR_W-1:0]           faddr;         // next SRAM byte to fetch
  logic                            fetch_done;    // all bytes of this stream fetched
  logic                            fetching;
  logic [7:0]                      pf_byte, nxt_byte;   // prefetch stage, next byte
  logic                            pf_valid, pf_last;
  logic                            nxt_valid, nxt_last;
  logic                            take;          // nxt goes onto the bus now
  logic                            pf_move;       // prefetch moves to nxt now
  logic                            on_bus, on_bus_last;
  logic [CFG_ADDR_W-1:0]           last_addr, inj_ptr;
  logic                            inj_pass;
  logic [CFG_ADDR_W-1:0]           inj_eff;       // injection address, kept inside the range
  logic [CFG_ADDR_W:0]             inj_next;

  assign rise = cclk_run && (cc == '0);
  assign fall = cclk_run && (cc == ($bits(cc))'(HALF));
  assign take     = fall && !on_bus && nxt_valid && (state == S_STREAM);
  // a new fetch may start in the cycle the prefetch register empties; its
  // data arrives at least one clock later, so pf_valid never collides
  assign pf_move  = pf_valid && (!nxt_valid || take);
  assign cclk_run = (state == S_STREAM) || (state == S_WAIT_DONE) || (state == S_SCRUB_GAP);
  assign last_addr = scrub_pass ? end_addr : CFG_ADDR_W'(CFG_LEN - 1);
  assign scrubbing = scrub_pass && (state != S_IDLE);
  assign inj_eff   = (inj_ptr < inj_low || inj_ptr > inj_high) ? inj_low : inj_ptr;
  assign inj_next  = {1'b0, inj_ptr} + (CFG_ADDR_W+1)'(INJ_STRIDE);

  function automatic logic [7:0] preamble(input logic [4:0] i, input logic [31:0] m, input logic [31:0] c);
    logic [31:0] w;
    unique case (i[4:2])
      3'd0:    w = 32'hFFFF_FFFF;   // dummy word
      3'd1:    w = 32'hAA99_5566;   // sync word
      3'd2:    w = 32'h3000_C001;   // type-1 write, 1 word, MASK
      3'd3:    w = m;
      3'd4:    w = 32'h3000_A001;   // type-1 write, 1 word, CTL0
      default: w = c;
    endcase
    return w[{~i[1:0], 3'b000} +: 8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cc           <= '0;
      tmr          <= '0;
      init_s       <= '0;
      done_s       <= '0;
      busy_q       <= 1'b0;
      scrub_pass   <= 1'b0;
      scrub_pend   <= 1'b0;
      pidx         <= '0;
      faddr        <= '0;
      fetch_done   <= 1'b0;
      fetching     <= 1'b0;
      nxt_byte     <= '0;
      nxt_valid    <= 1'b0;
      nxt_last     <= 1'b0;
      pf_byte      <= '0;
      pf_valid     <= 1'b0;
      pf_last      <= 1'b0;
      on_bus       <= 1'b0;
      on_bus_last  <= 1'b0;
      inj_ptr      <= INJ_LOW_DEFAULT;
      inj_pass     <= 1'b0;
      rd_req       <= 1'b0;
      rd_addr      <= '0;
      sm_cclk      <= 1'b0;
      sm_csi_b     <= 1'b1;
      sm_rdwr_b    <= 1'b0;
      sm_prog_b    <= 1'b1;
      sm_d         <= '0;
      config_done  <= 1'b0;
      cfg_error    <= 1'b0;
      scrub_passes <= '0;
      injections   <= '0;
    end else begin
      init_s <= {init_s[0], sm_init_b};
      done_s <= {done_s[0], sm_done};
      busy_q <= sm_busy;

      // CCLK generation
      if (cclk_run) begin
        cc <= (cc == ($bits(cc))'(CCLK_DIV - 1)) ? '0 : cc + 1'b1;
        if (rise) sm_cclk <= 1'b1;
        if (fall) sm_cclk <= 1'b0;
      end else begin
        cc      <= '0;
        sm_cclk <= 1'b0;
      end

      // byte fetch: preamble bytes directly, file bytes from SRAM
      if (state == S_STREAM && (!pf_valid || pf_move) && !fetch_done) begin
        if (scrub_pass && pidx < 5'(PRE_LEN)) begin
          // preamble bytes land at once, so only into an empty register
          if (!pf_valid) begin
            pf_byte  <= preamble(pidx, mask_reg, ctl_reg);
            pf_valid <= 1'b1;
            pf_last  <= 1'b0;
            pidx     <= pidx + 1'b1;
          end
        end else if (!fetching) begin
          fetching <= 1'b1;
          rd_req   <= 1'b1;
          rd_addr  <= faddr;
        end else if (rd_ack) begin
          fetching  <= 1'b0;
          rd_req    <= 1'b0;
          pf_valid <= 1'b1;
          pf_last  <= (faddr == last_addr);
          faddr     <= faddr + 1'b1;
          if (faddr == last_addr) fetch_done <= 1'b1;
          if (inj_pass && faddr == inj_ptr) begin
            pf_byte   <= rd_data ^ 8'h01;
            injections <= injections + 1'b1;
          end else begin
            pf_byte <= rd_data;
          end
        end
      end

      // bus side: the DUT takes the byte at the rising edge
      if (rise && on_bus && !busy_q) begin
        on_bus <= 1'b0;
      end
      if (fall) begin
        if (on_bus) begin
          // BUSY was high at the rising edge: byte stays on the bus
        end else if (nxt_valid && state == S_STREAM) begin
          sm_d        <= nxt_byte;
          sm_csi_b    <= 1'b0;
          sm_rdwr_b   <= 1'b0;
          on_bus      <= 1'b1;
          on_bus_last <= nxt_last;
          nxt_valid   <= 1'b0;
        end else begin
          sm_csi_b <= 1'b1;
        end
      end

      // prefetch -> next byte, also in the cycle the next byte is taken
      if (pf_move) begin
        nxt_byte  <= pf_byte;
        nxt_last  <= pf_last;
        nxt_valid <= 1'b1;
        pf_valid  <= 1'b0;
      end

      if (scrub_req && config_done) scrub_pend <= 1'b1;

      case (state)
        S_IDLE: begin
          sm_csi_b <= 1'b1;
          if (start_config) begin
            state       <= S_PROG;
            sm_prog_b   <= 1'b0;
            tmr         <= '0;
            config_done <= 1'b0;
            cfg_error   <= 1'b0;
            scrub_pass  <= 1'b0;
          end else if ((scrub_on || scrub_pend) && config_done) begin
            state      <= S_STREAM;
            scrub_pass <= 1'b1;
            scrub_pend <= 1'b0;
            inj_ptr    <= inj_eff;
            inj_pass   <= inject_on && (inj_eff <= end_addr);
            pidx       <= '0;
            faddr      <= '0;
            fetch_done <= 1'b0;
          end
        end
        S_PROG: begin
          tmr <= tmr + 1'b1;
          if (tmr == ($bits(tmr))'(PROG_CLKS - 1)) begin
            sm_prog_b <= 1'b1;
            state     <= S_WAIT_INIT;
            tmr       <= '0;
          end
        end
        S_WAIT_INIT: begin
          // INIT_B goes low after PROG_B and high again when the device
          // is ready; wait for it to be high and stable
          tmr <= tmr + 1'b1;
          if (init_s == 2'b11 && tmr > ($bits(tmr))'(8)) begin
            state      <= S_STREAM;
            pidx       <= '0;
            faddr      <= '0;
            fetch_done <= 1'b0;
            inj_pass   <= 1'b0;
            tmr        <= '0;
          end else if (tmr == ($bits(tmr))'(DONE_TIMEOUT)) begin
            cfg_error <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_STREAM: begin
          // the last byte has been taken by the DUT
          if (fetch_done && !pf_valid && !nxt_valid && !on_bus && on_bus_last) begin
            on_bus_last <= 1'b0;
            tmr         <= '0;
            if (scrub_pass) begin
              state        <= S_SCRUB_GAP;
              scrub_passes <= scrub_passes + 1'b1;
              if (inj_pass) begin
                inj_ptr <= (inj_next > {1'b0, inj_high}) ? inj_low : inj_next[CFG_ADDR_W-1:0];
              end
            end else begin
              state <= S_WAIT_DONE;
            end
          end
        end
        S_WAIT_DONE: begin
          tmr <= tmr + 1'b1;
          if (done_s == 2'b11) begin
            config_done <= 1'b1;
            state       <= S_IDLE;
          end else if (tmr == ($bits(tmr))'(DONE_TIMEOUT)) begin
            cfg_error <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: begin  // S_SCRUB_GAP: CSI_B high for one CCLK between passes
          if (rise) state <= S_IDLE;
        end
      endcase

      if (dut_reset) begin
        state       <= S_IDLE;
        config_done <= 1'b0;
        cfg_error   <= 1'b0;
        scrub_pass  <= 1'b0;
        scrub_pend  <= 1'b0;
        sm_prog_b   <= 1'b1;
        sm_csi_b    <= 1'b1;
        rd_req      <= 1'b0;
        fetching    <= 1'b0;
        nxt_valid   <= 1'b0;
        pf_valid    <= 1'b0;
        on_bus      <= 1'b0;
        on_bus_last <= 1'b0;
        inj_ptr     <= inj_low;
      end
    end
  end
endmodule
