// AES-128 crypto ASIP with its 4096 x 17 memory.
//
// The processor core runs a program from the memory; plaintext bytes arrive
// on cipher_in and round-key bytes on key_in (the key schedule is expanded
// off line and fed in, or preloaded), each byte announced by a pulse on
// fgi_set, and result bytes leave on out_port, each acknowledged by a pulse
// on fgo_set. While the core is stopped (running = 0) the host port owns the
// memory: host_we writes host_wdata at host_addr at the clock edge and
// host_rdata shows the word at host_addr. fetch marks the first clock of
// every instruction. A start pulse then runs the
// program from address 0 until it executes HALT. The core and the memory
// follow the processor's register configuration; the host port and start
// input are this design's way of loading and launching it.
module aes_asip_system
  import aes_asip_pkg::*;
#(
  parameter int unsigned ADDR_W     = 12,
  parameter int unsigned DATA_W     = 17,
  parameter logic [11:0] STATE_BASE = 12'hF00
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              running,
  input  logic [7:0]        cipher_in,
  input  logic [7:0]        key_in,
  output logic [7:0]        out_port,
  input  logic              fgi_set,
  input  logic              fgo_set,
  output logic              fgi,
  output logic              fgo,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata,
  output logic              fetch        // first clock of each instruction
);

  logic [ADDR_W-1:0] cpu_addr, m_addr;
  logic [DATA_W-1:0] cpu_wdata, m_wdata, m_rdata;
  logic              cpu_rw, cpu_en, m_we, m_en;

  aes_asip #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .STATE_BASE(STATE_BASE)
  ) u_cpu (
    .clk, .rst, .start, .running,
    .key_in, .cipher_in, .out_port,
    .fgi_set, .fgo_set, .fgi, .fgo,
    .address_bus(cpu_addr), .data_bus_out(cpu_wdata), .data_bus_in(m_rdata),
    .rw_m(cpu_rw), .en_m(cpu_en), .fetch
  );

  // The host reaches the memory only while the core is stopped.
  always_comb begin
    if (running) begin
      m_addr  = cpu_addr;
      m_wdata = cpu_wdata;
      m_we    = cpu_rw;
      m_en    = cpu_en;
    end else begin
      m_addr  = host_addr;
      m_wdata = host_wdata;
      m_we    = host_we;
      m_en    = host_we;
    end
  end

  mem_unit #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  assign host_rdata = m_rdata;

endmodule
