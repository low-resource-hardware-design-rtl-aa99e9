// ecp_top: 16-bit elliptic-curve processor for contactless devices.
//
// Harvard architecture: the program memory (a look-up table of 72-bit
// control vectors indexed by the PC) drives the CPU (register file and ALU
// with arithmetic, logic, branching and multiply-accumulate units), which
// has one single-port data memory made of data RAM, a constant ROM and
// memory-mapped I/O. There is no instruction decoder: the control vector
// is the instruction. This partition follows the published design's block diagram.
// Host interface (this design's): the host writes the I/O input registers
// (host_we/host_addr/host_wdata) and reads the I/O output registers
// (io_out); halted is high while the program sits on a HALT vector.
// With the bundled program, the host writes A (inputs 0..11), B (12..23),
// then a start word (24): 2 for A+B mod p192, 3 for A-B mod p192, 4 for
// the Montgomery product A*B*2^-192 mod n, any other non-zero value for
// A*B mod p192. The processor leaves the result in io_out[0..11], sets
// io_out[12] = 1 and halts.
// Timing: one control vector per cycle, two cycles for RET.
// Reset: synchronous, active low; execution starts at PC 0.
module ecp_top
  import ecp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_we,
  input  logic [5:0] host_addr,
  input  word_t      host_wdata,
  output word_t      io_out [IO_N_OUT],
  output logic       halted
);
  logic [PC_W-1:0] pc;
  ctrl_t           ctrl;
  logic            mem_req, mem_we;
  word_t           mem_addr, mem_wdata, mem_rdata;

  program_memory #(.DEPTH(PM_DEPTH)) u_pm (.pc, .ctrl);

  ecp_cpu u_cpu (
    .clk, .rst_n, .ctrl, .pc,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .halted, .ret_stall(), .br_taken());

  data_memory u_dm (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata),
    .host_we, .host_addr, .host_wdata, .io_out);
endmodule
