// thinning_system: thinning processor with its main memory.
//
// Top level of the design. The host (in the complete fingerprint verifier,
// the embedded processor that captures and binarises the print) writes the
// binary image into main memory through the host port, pulses start, waits
// for done and reads the skeleton back from the same addresses. Image
// layout: IMG_W/8 bytes per line, line after line, bit 7 the leftmost
// pixel, 1 = ridge (object), 0 = background. While busy is high the
// processor owns the memory and host accesses are ignored; host_rdata
// appears one clock after host_rd. The processor and its main memory
// follow the published architecture; the host port is this design's choice.
module thinning_system
  import thinning_pkg::*;
#(
  parameter int unsigned IMG_W = DEF_IMG_W,
  parameter int unsigned IMG_H = DEF_IMG_H,
  localparam int unsigned MAW  = $clog2(IMG_W / PIX * IMG_H)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic [MAW-1:0] host_addr,
  input  logic           host_wr,
  input  logic           host_rd,
  input  logic [PIX-1:0] host_wdata,
  output logic [PIX-1:0] host_rdata
);

  logic [MAW-1:0] p_addr, m_addr;
  logic           p_read, p_write, m_rd, m_wr;
  logic [PIX-1:0] p_wdata, m_din, m_dout;

  thinning_processor #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_proc (
    .clk, .rst_n, .start, .busy, .done,
    .mem_addr  (p_addr),
    .mem_read  (p_read),
    .mem_write (p_write),
    .mem_wdata (p_wdata),
    .mem_rdata (m_dout)
  );

  always_comb begin
    if (busy) begin
      m_addr = p_addr;
      m_rd   = p_read;
      m_wr   = p_write;
      m_din  = p_wdata;
    end else begin
      m_addr = host_addr;
      m_rd   = host_rd;
      m_wr   = host_wr;
      m_din  = host_wdata;
    end
  end

  main_memory #(.WORDS(IMG_W / PIX * IMG_H)) u_mem (
    .clk,
    .addr (m_addr),
    .rd   (m_rd),
    .wr   (m_wr),
    .din  (m_din),
    .dout (m_dout)
  );

  assign host_rdata = m_dout;

endmodule
