// pcmcia_attr_mem_model: behavioural model of the attribute memory.
// Not synthesizable RTL; used by the end-to-end testbench only.
//
// A 64-byte asynchronous SRAM organised as 32 x 16 bits (even byte on
// 7:0, odd byte on 15:8), selected by CS#. With AOE# low it drives both
// lanes; with AWE# low it stores the lanes the controller drives (level
// sensitive write).
module pcmcia_attr_mem_model (
  input  logic [25:0] add,
  input  logic        cs_n,
  input  logic        aoe_n,
  input  logic        awe_n,
  input  logic [15:0] bus_i,
  input  logic [1:0]  bus_we,
  output logic [15:0] drive_o,
  output logic        drive_en
);
  logic [7:0] mem [64];
  logic [5:0] base;

  assign base     = {add[5:1], 1'b0};
  assign drive_en = !cs_n && !aoe_n;
  assign drive_o  = {mem[base | 6'd1], mem[base]};

  initial foreach (mem[i]) mem[i] = 8'(255 - i * 3);

  always @(cs_n, awe_n, bus_i, bus_we, add) begin
    if (!cs_n && !awe_n) begin
      if (bus_we[0]) mem[base]        = bus_i[7:0];
      if (bus_we[1]) mem[base | 6'd1] = bus_i[15:8];
    end
  end
endmodule
