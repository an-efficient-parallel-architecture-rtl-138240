// rl_system_interface: host port of the DSP system.
//
// A simple 32-bit memory-mapped slave. Word address map (addr[15:12]):
//   0x0nnn  data memory word n
//   0x1ppc  program buffer: addr[10:5] = step, addr[4:0] = 32-bit chunk
//           (write only)
//   0x2000  write: bit0 start, bit1 clear cfg_err
//           read:  bit0 busy, bit1 done, bit2 cfg_err
//   0x2001  read: cycles of the last run
// A write is one cycle with req=1, we=1. A read is one cycle with req=1,
// we=0; rdata is valid with rvalid in the next cycle. Writes to the data
// memory and program buffer are ignored while the array is busy, so a running
// kernel cannot be disturbed. The system interface block follows the
// architecture, which does not describe it; the bus and the map are this
// implementation's choices.
module rl_system_interface
  import rl_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // host bus
  input  logic                      req,
  input  logic                      we,
  input  logic [15:0]               addr,
  input  word_t                     wdata,
  output word_t                     rdata,
  output logic                      rvalid,
  // data scheduler host port
  output logic                      dm_we,
  output logic [DADDR_W-1:0]        dm_addr,
  output word_t                     dm_wdata,
  input  word_t                     dm_rdata,
  // program buffer write port
  output logic                      pb_we,
  output logic [PADDR_W-1:0]        pb_addr,
  output logic [$clog2(NCHUNK)-1:0] pb_chunk,
  output word_t                     pb_wdata,
  // main controller / configurator
  output logic                      start,
  output logic                      clr_err,
  input  logic                      busy,
  input  logic                      done,
  input  logic                      cfg_err,
  input  logic [31:0]               cycles
);

  localparam logic [3:0] RG_DMEM = 4'h0, RG_PBUF = 4'h1, RG_CSR = 4'h2;

  logic [3:0] region;
  assign region = addr[15:12];

  assign dm_addr  = addr[DADDR_W-1:0];
  assign dm_wdata = wdata;
  assign dm_we    = req && we && (region == RG_DMEM) && !busy;

  assign pb_addr  = addr[5 +: PADDR_W];
  assign pb_chunk = addr[$clog2(NCHUNK)-1:0];
  assign pb_wdata = wdata;
  assign pb_we    = req && we && (region == RG_PBUF) && !busy;

  assign start    = req && we && (region == RG_CSR) && (addr[0] == 1'b0) && wdata[0] && !busy;
  assign clr_err  = req && we && (region == RG_CSR) && (addr[0] == 1'b0) && wdata[1];

  logic       rd_q;
  logic [3:0] rd_region_q;
  word_t      csr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q        <= 1'b0;
      rd_region_q <= '0;
      csr_q       <= '0;
    end else begin
      rd_q        <= req && !we;
      rd_region_q <= region;
      csr_q       <= addr[0] ? cycles : {29'd0, cfg_err, done, busy};
    end
  end

  assign rvalid = rd_q;
  always_comb begin
    unique case (rd_region_q)
      RG_DMEM: rdata = dm_rdata;
      RG_CSR:  rdata = csr_q;
      default: rdata = '0;
    endcase
  end

endmodule
