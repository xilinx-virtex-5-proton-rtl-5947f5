// sram_ctrl: drives the tester's external asynchronous SRAM (16-bit data,
// 20-bit address, active-low chip enable, write, output enable and two byte
// enables) that holds the DUT's configuration .bin file.
//
// The file is addressed in bytes; byte address A lives in 16-bit word A>>1,
// low byte for even A and high byte for odd A, selected with the byte
// enables (SRAM_BLEN low byte, SRAM_BLHN high byte). Two request ports:
// a write port (bytes arriving from the host) with priority, and a read
// port (the SelectMap engine). A request is held until its ack pulse.
// Each access holds address, enables and data for ACC_CLKS tester clocks
// (default 2, 13.3 ns at 150 MHz), then one idle clock; read data is sampled
// at the end of the access. The data bus is split into d_o / d_i / d_oe; the
// board-level tristate buffer is outside this module. Byte packing, access
// timing and arbitration are this design's choices: the test plan gives only
// the pin list and that the file is stored in SRAM.
module sram_ctrl
  import v5test_pkg::*;
#(
  parameter int unsigned ACC_CLKS = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write port
  input  logic                  wr_req,
  input  logic [CFG_ADDR_W-1:0] wr_addr,
  input  logic [7:0]            wr_data,
  output logic                  wr_ack,
  // read port
  input  logic                  rd_req,
  input  logic [CFG_ADDR_W-1:0] rd_addr,
  output logic [7:0]            rd_data,
  output logic                  rd_ack,
  // SRAM pins (active low controls)
  output logic [19:0]           sram_a,
  output logic [15:0]           sram_d_o,
  input  logic [15:0]           sram_d_i,
  output logic                  sram_d_oe,
  output logic                  sram_we_n,
  output logic                  sram_oe_n,
  output logic                  sram_ce_n,
  output logic                  sram_blen_n,
  output logic                  sram_blhn_n
);
  typedef enum logic [1:0] {M_IDLE, M_ACCESS, M_GAP} mstate_e;
  mstate_e    state;
  logic       is_wr, hi;
  logic [3:0] cnt;

  initial assert (ACC_CLKS >= 1 && ACC_CLKS < 16) else $error("ACC_CLKS out of range");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= M_IDLE;
      is_wr       <= 1'b0;
      hi          <= 1'b0;
      cnt         <= '0;
      sram_a      <= '0;
      sram_d_o    <= '0;
      sram_d_oe   <= 1'b0;
      sram_we_n   <= 1'b1;
      sram_oe_n   <= 1'b1;
      sram_ce_n   <= 1'b1;
      sram_blen_n <= 1'b1;
      sram_blhn_n <= 1'b1;
      rd_data     <= '0;
      wr_ack      <= 1'b0;
      rd_ack      <= 1'b0;
    end else begin
      wr_ack <= 1'b0;
      rd_ack <= 1'b0;
      case (state)
        M_IDLE: begin
          if (wr_req || rd_req) begin
            automatic logic [CFG_ADDR_W-1:0] a = wr_req ? wr_addr : rd_addr;
            state       <= M_ACCESS;
            is_wr       <= wr_req;
            hi          <= a[0];
            cnt         <= '0;
            sram_a      <= {1'b0, a[CFG_ADDR_W-1:1]};
            sram_d_o    <= {wr_data, wr_data};
            sram_d_oe   <= wr_req;
            sram_we_n   <= !wr_req;
            sram_oe_n   <= wr_req;
            sram_ce_n   <= 1'b0;
            sram_blen_n <= a[0];
            sram_blhn_n <= !a[0];
          end
        end
        M_ACCESS: begin
          if (cnt == 4'(ACC_CLKS - 1)) begin
            state       <= M_GAP;
            sram_we_n   <= 1'b1;
            sram_oe_n   <= 1'b1;
            sram_ce_n   <= 1'b1;
            sram_blen_n <= 1'b1;
            sram_blhn_n <= 1'b1;
            if (is_wr) wr_ack <= 1'b1;
            else begin
              rd_ack  <= 1'b1;
              rd_data <= hi ? sram_d_i[15:8] : sram_d_i[7:0];
            end
          end else cnt <= cnt + 1'b1;
        end
        default: begin   // M_GAP: one idle clock, data bus released
          sram_d_oe <= 1'b0;
          state     <= M_IDLE;
        end
      endcase
    end
  end
endmodule
