// isc_top: the ISC computer, a processor and a memory joined by an address
// bus and a data bus.
//
// Program and data share one memory. While `rst_n` is low the processor is
// held in reset and a host (an assembler/loader) owns the memory through the
// `host_*` port: `host_we` writes `host_wdata` at `host_addr` on the clock
// edge and `host_rdata` reads `host_addr` combinationally. When `rst_n` goes
// high the processor starts fetching at address 0 and owns the memory; the
// host port is then ignored. `fetch` pulses on the first cycle of each
// instruction, `ip` is the instruction pointer, and `dbg_idx`/`dbg_data`
// read a general register at any time.
//
// The memory answers reads combinationally, so the processor's read strobe
// needs no wiring here; it stays available on isc_cpu for a slower memory.
//
// The processor/memory split is the ISC's. The memory size (2**MEM_AW words)
// and the host port are this design's, since the ISC loads programs with a
// software loader that it does not describe in hardware.
module isc_top
  import isc_pkg::*;
#(
  parameter int MEM_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_we,
  input  logic [MEM_AW-1:0] host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata,
  output logic              fetch,
  output word_t             ip,
  input  reg_idx_t          dbg_idx,
  output word_t             dbg_data
);

  word_t             cpu_addr, cpu_wdata, mem_rdata;
  logic              cpu_rd, cpu_wr;
  logic [MEM_AW-1:0] mem_addr;
  logic              mem_we;
  word_t             mem_wdata;

  isc_cpu u_cpu (
    .clk, .rst_n,
    .mem_addr(cpu_addr), .mem_rd(cpu_rd), .mem_wr(cpu_wr),
    .mem_wdata(cpu_wdata), .mem_rdata,
    .fetch, .ip, .dbg_idx, .dbg_data
  );

  always_comb begin
    if (!rst_n) begin
      mem_addr  = host_addr;
      mem_we    = host_we;
      mem_wdata = host_wdata;
    end else begin
      mem_addr  = cpu_addr[MEM_AW-1:0];
      mem_we    = cpu_wr;
      mem_wdata = cpu_wdata;
    end
  end

  isc_memory #(.WIDTH(WORD_W), .AW(MEM_AW)) u_mem (
    .clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign host_rdata = mem_rdata;

endmodule
