// sram_model: behavioural model of the tester's external asynchronous SRAM
// (1M x 16, active-low chip enable, write enable, output enable and byte
// enables). Not synthesizable: a write happens whenever CE and WE are low,
// for the enabled bytes; read data appears combinationally while CE and OE
// are low (0 otherwise). d_oe is unused here. Testbenches may preload mem directly.
module sram_model (
  input  logic [19:0] a,
  input  logic [15:0] d_in,     // from the controller
  input  logic        d_oe,     // controller drives the bus
  output logic [15:0] d_out,    // to the controller
  input  logic        we_n,
  input  logic        oe_n,
  input  logic        ce_n,
  input  logic        blen_n,
  input  logic        blhn_n
);
  logic [15:0] mem [0:(1<<20)-1];

  assign d_out = (!ce_n && !oe_n) ? mem[a] : 16'h0;

  always @(a or d_in or d_oe or we_n or oe_n or ce_n or blen_n or blhn_n) begin
    if (!ce_n && !we_n) begin
      logic [15:0] w;
      w = mem[a];
      if (!blen_n) w[7:0]  = d_in[7:0];
      if (!blhn_n) w[15:8] = d_in[15:8];
      mem[a] = w;
    end
  end

  function automatic logic [7:0] read_byte(input logic [19:0] byte_addr);
    logic [15:0] w;
    w = mem[{1'b0, byte_addr[19:1]}];
    return byte_addr[0] ? w[15:8] : w[7:0];
  endfunction

  function automatic void write_byte(input logic [19:0] byte_addr, input logic [7:0] b);
    logic [15:0] w;
    w = mem[{1'b0, byte_addr[19:1]}];
    if (byte_addr[0]) w[15:8] = b; else w[7:0] = b;
    mem[{1'b0, byte_addr[19:1]}] = w;
  endfunction
endmodule
