// io_port: memory-mapped input/output registers.
//
// The published design maps I/O modules (for an RFID tag, e.g. the air interface)
// into the data memory without fixing what they are. This block is a
// generic mailbox: N_IN input registers written by the host side and read by
// the CPU, and N_OUT output registers written by the CPU and visible to the
// host. CPU word offsets: 0..N_IN-1 read the inputs; N_IN..N_IN+N_OUT-1 read
// and write the outputs; writes to inputs are ignored; unmapped reads give 0.
// Timing: CPU reads are registered (data one cycle after en), like the RAM.
// Host writes take effect at the next rising edge. Synchronous active-low
// reset clears all registers.
module io_port
  import ecp_pkg::*;
#(
  parameter int unsigned N_IN  = IO_N_IN,
  parameter int unsigned N_OUT = IO_N_OUT,
  parameter int unsigned AW    = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU side
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata,
  // host side
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  word_t         host_wdata,
  output word_t         out_regs [N_OUT]
);
  word_t in_regs [N_IN];

  initial assert (N_IN + N_OUT <= 2**AW) else $error("io_port: map exceeds address width");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_regs  <= '{default: '0};
      out_regs <= '{default: '0};
      rdata    <= '0;
    end else begin
      if (host_we && int'(host_addr) < N_IN) in_regs[int'(host_addr)] <= host_wdata;
      if (en) begin
        if (we) begin
          if (int'(addr) >= N_IN && int'(addr) < N_IN + N_OUT)
            out_regs[int'(addr) - N_IN] <= wdata;
        end else begin
          if (int'(addr) < N_IN)              rdata <= in_regs[int'(addr)];
          else if (int'(addr) < N_IN + N_OUT) rdata <= out_regs[int'(addr) - N_IN];
          else                                rdata <= '0;
        end
      end
    end
  end
endmodule
