// tb_data_memory: drives the single data port with random loads and stores
// over the whole address map and compares with a model of the three parts:
// RAM words, constant-ROM words (p192 is checked word by word, the ROM
// otherwise only for being read-only), I/O inputs written by the host and
// I/O outputs written by the CPU. Loads return one cycle later.
module tb_data_memory;
  import ecp_pkg::*;
  logic clk = 0, rst_n, req, we, host_we;
  word_t addr, wdata, rdata, host_wdata;
  logic [5:0] host_addr;
  word_t io_out [IO_N_OUT];
  int checks = 0, failures = 0;
  word_t m_ram [RAM_WORDS];
  word_t m_rom [ROM_WORDS];
  logic  rom_known [ROM_WORDS];
  word_t m_in [IO_N_IN];
  word_t m_out [IO_N_OUT];

  data_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    word_t exp_r; logic exp_known; int off; logic [191:0] p;
    req = 0; we = 0; addr = 0; wdata = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    m_in = '{default: 0}; m_out = '{default: 0};
    p = (192'(1) << 192) - (192'(1) << 64) - 1;   // wraps to 2^192-2^64-1
    for (int i = 0; i < ROM_WORDS; i++) begin
      rom_known[i] = (i < 12); m_rom[i] = (i < 12) ? p[16*i +: 16] : 0;
    end
    for (int i = 0; i < RAM_WORDS; i++) begin
      @(negedge clk); req = 1; we = 1; addr = word_t'(i); wdata = word_t'($urandom); m_ram[i] = wdata;
    end
    for (int i = 0; i < IO_N_IN; i++) begin
      @(negedge clk); req = 0; host_we = 1; host_addr = 6'(i); host_wdata = word_t'($urandom);
      m_in[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    exp_r = 0; exp_known = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      req = 1'($urandom); we = 1'($urandom); wdata = word_t'($urandom);
      case ($urandom_range(3))
        0: addr = word_t'($urandom_range(RAM_WORDS + 4));
        1: addr = ROM_BASE + word_t'($urandom_range(ROM_WORDS + 4));
        2: addr = IO_BASE + word_t'($urandom_range(63));
        default: addr = word_t'($urandom);
      endcase
      off = int'(addr[7:0]);
      if (req && !we) begin
        exp_known = 1;
        if (addr[15:10] != 0) exp_r = 0;
        else if (addr[9:8] == 0) exp_r = (off < RAM_WORDS) ? m_ram[off] : 0;
        else if (addr[9:8] == 1) begin
          exp_r = (off < ROM_WORDS) ? m_rom[off] : 0;
          exp_known = (off >= ROM_WORDS) || rom_known[off];
        end
        else if (addr[9:8] == 2 && off < IO_N_IN) exp_r = m_in[off];
        else if (addr[9:8] == 2 && off < IO_N_IN + IO_N_OUT) exp_r = m_out[off - IO_N_IN];
        else exp_r = 0;
      end
      if (req && we && addr[15:10] == 0) begin
        if (addr[9:8] == 0 && off < RAM_WORDS) m_ram[off] = wdata;
        if (addr[9:8] == 2 && off >= IO_N_IN && off < IO_N_IN + IO_N_OUT) m_out[off - IO_N_IN] = wdata;
      end
      @(posedge clk); #1;
      if (req && !we && !exp_known && addr[9:8] == 1 && off < ROM_WORDS) begin
        m_rom[off] = rdata; rom_known[off] = 1; exp_r = rdata;
      end
      checks++;
      if ((exp_known && rdata !== exp_r) || io_out != m_out) begin
        failures++; $display("FAIL addr=%h rdata=%h exp %h", addr, rdata, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
