// selectmap_slave_model: behavioural stand-in for the Virtex-5's SelectMap
// configuration port in slave mode (not synthesizable, and not the device's
// real configuration logic). PROG_B low clears it and pulls INIT_B low;
// INIT_B returns high INIT_DELAY time units after PROG_B rises. Every rising
// CCLK with CSI_B and RDWR_B low and BUSY low stores D in `bytes`. After
// DONE_AFTER bytes have arrived since PROG_B, DONE rises 8 CCLKs later
// (unless no_done is set). With BUSY_EN, BUSY is raised at random on falling
// CCLK edges, and bytes offered while it is high are ignored.
module selectmap_slave_model #(
  parameter int unsigned DONE_AFTER = 64,
  parameter int unsigned INIT_DELAY = 200,
  parameter bit          BUSY_EN    = 1'b0
) (
  input  logic       cclk,
  input  logic       csi_b,
  input  logic       rdwr_b,
  input  logic       prog_b,
  input  logic [7:0] d,
  output logic       init_b,
  output logic       done,
  output logic       busy
);
  byte unsigned bytes [$];
  int  since_prog = 0, after_cnt = -1, busy_hits = 0;
  bit  no_done = 0;

  initial begin init_b = 1; done = 0; busy = 0; end

  always @(negedge prog_b) begin
    init_b = 0; done = 0; since_prog = 0; after_cnt = -1;
  end
  always @(posedge prog_b) begin
    #(INIT_DELAY) init_b = 1;
  end

  always @(posedge cclk) begin
    if (!csi_b && !rdwr_b) begin
      if (busy) busy_hits++;
      else begin
        bytes.push_back(d);
        since_prog++;
        if (since_prog == int'(DONE_AFTER)) after_cnt = 0;
      end
    end
    if (after_cnt >= 0) begin
      after_cnt++;
      if (after_cnt == 8 && !no_done) done = 1;
    end
  end

  always @(negedge cclk) busy = BUSY_EN && ($urandom_range(0, 5) == 0);
endmodule
