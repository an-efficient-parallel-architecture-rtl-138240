// rl_data_scheduler: data memory that streams operands into the LE array and
// collects results from it.
//
// It holds DEPTH words. For every issued program step it reads NRD words,
// one per read port, at base + iteration*stride of that port, and on each of
// its NWR write ports writes one selected LE output back to
// base + (iteration-skip)*stride once the iteration count has reached skip, so a result that leaves the array a few
// cycles after its operands entered lands at the right address. A host port
// reads and writes the memory when the array is idle.
//
// Timing: two stages. In the issue cycle (issue=1) the addresses are computed
// and the reads performed; the read data appear on rdata in the following
// "apply" cycle, the cycle in which the LE configuration of that step is also
// applied. The write of that step takes le_out in the apply cycle and lands at
// its end. The host read data appear one cycle after host_addr. When two
// writes hit one address in a cycle, the higher-numbered write port wins, and
// every write port wins over the host.
//
// The scheduler block and its place between the controller and the routers
// follow the architecture, which does not describe its insides; the memory
// size, port count and strided addressing are this implementation's choices.
module rl_data_scheduler
  import rl_pkg::*;
#(
  parameter int DEPTH = 1 << DADDR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the main controller, issue stage
  input  logic                issue,
  input  logic [ITER_W-1:0]   iter,
  input  sched_cfg_t          cfg,
  // to / from the LE array, apply stage
  output word_t [NRD-1:0]     rdata,
  input  word_t [NOUT-1:0]    le_out,
  // host port
  input  logic                host_we,
  input  logic [DADDR_W-1:0]  host_addr,
  input  word_t               host_wdata,
  output word_t               host_rdata
);

  word_t mem [DEPTH];

  logic [NWR-1:0]               wr_v_q;
  logic [NWR-1:0][4:0]          wr_src_q;
  logic [NWR-1:0][DADDR_W-1:0]  wr_addr_q;

  function automatic logic [DADDR_W-1:0] step_addr(logic [DADDR_W-1:0] base,
                                                   logic signed [7:0] stride,
                                                   logic [ITER_W-1:0] n);
    logic signed [ITER_W+8:0] off;
    off = $signed({1'b0, n}) * stride;
    return base + off[DADDR_W-1:0];
  endfunction

  // read ports
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (issue) begin
      for (int p = 0; p < NRD; p++)
        rdata[p] <= mem[step_addr(cfg.rd[p].base, cfg.rd[p].stride, iter)];
    end
  end

  // write stage register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_v_q    <= '0;
      wr_src_q  <= '0;
      wr_addr_q <= '0;
    end else begin
      for (int w = 0; w < NWR; w++) begin
        wr_v_q[w]    <= issue && cfg.wr[w].en && (iter >= ITER_W'(cfg.wr[w].skip));
        wr_src_q[w]  <= cfg.wr[w].src;
        wr_addr_q[w] <= step_addr(cfg.wr[w].base, cfg.wr[w].stride,
                                  iter - ITER_W'(cfg.wr[w].skip));
      end
    end
  end

  // memory writes: host, then array ports in order (last one wins)
  always_ff @(posedge clk) begin
    if (host_we)
      mem[host_addr] <= host_wdata;
    for (int w = 0; w < NWR; w++)
      if (wr_v_q[w])
        mem[wr_addr_q[w]] <= le_out[wr_src_q[w]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rdata <= '0;
    else        host_rdata <= mem[host_addr];
  end

endmodule
