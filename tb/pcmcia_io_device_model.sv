// pcmcia_io_device_model: behavioural model of a card's I/O device.
// Not synthesizable RTL; used by the end-to-end testbench only.
//
// 32 byte-wide I/O registers at WIN_BASE .. WIN_BASE+31 on a 16-bit data
// bus (even byte on 7:0, odd byte on 15:8). Offsets 0..15 form 16-bit
// registers and pull IOIS16# low whenever addressed; offsets 16..31 are
// 8-bit registers. With IORD# low and the address in the window the model
// drives both byte lanes. With IOWR# low it stores every lane the
// controller drives (level sensitive, like an asynchronous register file).
module pcmcia_io_device_model #(
  parameter logic [25:0] WIN_BASE = 26'h300
) (
  input  logic [25:0] add,
  input  logic        iord_n,
  input  logic        iowr_n,
  input  logic [15:0] bus_i,      // card data bus as seen by the device
  input  logic [1:0]  bus_we,     // lanes driven by the controller
  output logic [15:0] drive_o,
  output logic        drive_en,
  output logic        iois16_n
);
  logic [7:0] mem [32];
  logic       in_win;
  logic [4:0] base;

  assign in_win   = (add >= WIN_BASE) && (add < WIN_BASE + 26'd32);
  assign base     = {add[4:1], 1'b0};
  assign iois16_n = !(in_win && !base[4]);
  assign drive_en = in_win && !iord_n;
  assign drive_o  = {mem[base | 5'd1], mem[base]};

  initial foreach (mem[i]) mem[i] = 8'(i * 7 + 3);

  always @(iowr_n, bus_i, bus_we, add) begin
    if (!iowr_n && in_win) begin
      if (bus_we[0]) mem[base]         = bus_i[7:0];
      if (bus_we[1]) mem[base | 5'd1]  = bus_i[15:8];
    end
  end
endmodule
