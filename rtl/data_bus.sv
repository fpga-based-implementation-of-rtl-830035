// data_bus: the common 16-bit data bus.
//
// Every transfer between the register file, ALU, status register, data RAM
// and I/O registers passes over this bus, and only one source may drive it in
// a cycle. The control unit names that source (src); for I/O reads the one
// register block whose io_hit is set supplies the value (unmapped addresses
// read 0). A board-level design would use tri-state drivers; here the bus is a
// multiplexer, which makes a second driver impossible. An assertion checks
// that no two I/O blocks answer the same address. Combinational.
module data_bus
  import mcu_pkg::*;
#(
  parameter int unsigned NIO = 6
) (
  input  logic     clk,
  input  bus_src_e src,
  input  word_t    alu,
  input  word_t    ram,
  input  word_t    tmp,
  input  word_t    io_rdata [NIO],
  input  logic     io_hit   [NIO],
  output word_t    bus
);

  word_t io_val;
  int    n_hit;

  always_comb begin
    io_val = '0;
    n_hit  = 0;
    for (int i = 0; i < NIO; i++) begin
      if (io_hit[i]) begin
        io_val = io_rdata[i];
        n_hit  = n_hit + 1;
      end
    end
  end

  always_comb begin
    unique case (src)
      BUS_ALU: bus = alu;
      BUS_RAM: bus = ram;
      BUS_IO:  bus = io_val;
      BUS_TMP: bus = tmp;
      default: bus = '0;
    endcase
  end

  assert property (@(posedge clk) n_hit <= 1);

endmodule
