// data_memory: the processor's single data port, split into three parts.
//
// As in the published design, data memory consists of the data RAM (a single-port
// macro), a constant look-up table and memory-mapped I/O, all behind one
// port that can do one load or one store per cycle. The address map is this
// design's: addr[15:10] must be 0 and addr[9:8] selects RAM (0x000), constant
// ROM (0x100) or I/O (0x200); the low bits index the part. Reads of unmapped
// addresses return 0 and stores to the ROM or unmapped space are dropped.
// Timing: a load presented with req=1, we=0 returns its word on rdata in the
// next cycle; rdata keeps the last loaded word until the next load.
module data_memory
  import ecp_pkg::*;
#(
  parameter int unsigned RAM_W  = RAM_WORDS,
  parameter int unsigned ROM_W  = ROM_WORDS,
  parameter int unsigned IO_IN  = IO_N_IN,
  parameter int unsigned IO_OUT = IO_N_OUT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req,
  input  logic  we,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  // I/O host side
  input  logic       host_we,
  input  logic [5:0] host_addr,
  input  word_t      host_wdata,
  output word_t      io_out [IO_OUT]
);
  localparam int unsigned RAM_AW = $clog2(RAM_W);
  localparam int unsigned ROM_AW = $clog2(ROM_W);

  region_e region, region_q;
  word_t   ram_rdata, rom_rdata, io_rdata;
  logic    ram_en, rom_en, io_en;

  always_comb begin
    if (addr[15:10] != '0) region = REG_NONE;
    else                   region = region_e'(addr[9:8]);
    ram_en = req && region == REG_RAM && int'(addr[7:0]) < RAM_W;
    rom_en = req && !we && region == REG_ROM && int'(addr[7:0]) < ROM_W;
    io_en  = req && region == REG_IO && addr[7:6] == 2'b00;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          region_q <= REG_NONE;
    else if (req && !we) region_q <= (ram_en || rom_en || io_en) ? region : REG_NONE;
  end

  data_ram #(.WORDS(RAM_W)) u_ram (
    .clk, .en(ram_en), .we, .addr(addr[RAM_AW-1:0]), .wdata, .rdata(ram_rdata));

  constant_rom #(.WORDS(ROM_W)) u_rom (
    .clk, .en(rom_en), .addr(addr[ROM_AW-1:0]), .rdata(rom_rdata));

  io_port #(.N_IN(IO_IN), .N_OUT(IO_OUT), .AW(6)) u_io (
    .clk, .rst_n, .en(io_en), .we, .addr(addr[5:0]), .wdata, .rdata(io_rdata),
    .host_we, .host_addr, .host_wdata, .out_regs(io_out));

  always_comb begin
    unique case (region_q)
      REG_RAM: rdata = ram_rdata;
      REG_ROM: rdata = rom_rdata;
      REG_IO:  rdata = io_rdata;
      default: rdata = '0;
    endcase
  end
endmodule
