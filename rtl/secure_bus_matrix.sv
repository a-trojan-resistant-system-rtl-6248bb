// secure_bus_matrix -- master/slave multiplexers, default slave and
// malicious-wait watchdog of the Trojan-resistant bus.
//
// Forward path: the master named by the arbiter (`master_id`, valid when
// `owner_valid`) drives the shared slave-side bus (trans/addr/write/wdata).
// Only the owner's `trans` counts, so a master without a grant cannot start a
// transfer.  Return path: read data and wait of the slave selected by the
// address decoder are returned to all masters; `m_ready` tells the owner that
// its transfer completed in this cycle.  When the decoder selects the default
// slave (empty address space, unauthorized access, or masked slave) the
// transfer completes at once with `m_err` set and read data zero.
//
// Protection: a counter counts the consecutive cycles in which the selected
// slave holds wait during one transfer.  When wait is still asserted after
// `wait_thresh` counted cycles, `mal_wait` (Malicious Wait Detection) is
// raised for one cycle: the wait seen by the master is nullified so the
// transfer ends (with `m_err`), and the address decoder latches the slave into
// its malicious slave mask register.  `bus_busy` tells the arbiter that the
// owner is inside a wait state and must not lose the bus.
//
// All paths are combinational except the wait counter.  The counter, the
// threshold and the nullifying AND gate follow the published architecture; the
// error response of the default slave and of a nullified transfer, and the
// counter restart rule, are this design's choices.
module secure_bus_matrix
  import trojan_bus_pkg::*;
#(
  parameter int unsigned NM = NUM_MASTERS,
  parameter int unsigned NS = NUM_SLAVES,
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W,
  parameter int unsigned CW = CNT_W,
  localparam int unsigned MIDW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from the arbiter
  input  logic [MIDW-1:0]        master_id,
  input  logic                   owner_valid,
  // master side
  input  logic [NM-1:0]          m_trans,
  input  logic [NM-1:0][AW-1:0]  m_addr,
  input  logic [NM-1:0]          m_write,
  input  logic [NM-1:0][DW-1:0]  m_wdata,
  output logic [NM-1:0]          m_ready,
  output logic [DW-1:0]          m_rdata,
  output logic                   m_err,
  // shared slave-side bus (also read by the address decoder)
  output logic                   bus_trans,
  output logic [AW-1:0]          bus_addr,
  output logic                   bus_write,
  output logic [DW-1:0]          bus_wdata,
  // from the address decoder
  input  logic [NS-1:0]          slave_sel,
  input  logic                   default_sel,
  // slave responses
  input  logic [NS-1:0][DW-1:0]  s_rdata,
  input  logic [NS-1:0]          s_wait,
  // protection
  input  logic [CW-1:0]          wait_thresh,
  output logic                   mal_wait,
  output logic                   bus_busy
);

  logic          wait_raw, wait_eff, done;
  logic [CW-1:0] wait_cnt;

  // Master -> slave multiplexer.
  assign bus_trans = owner_valid && m_trans[master_id];
  assign bus_addr  = m_addr[master_id];
  assign bus_write = m_write[master_id];
  assign bus_wdata = m_wdata[master_id];

  // Slave -> master multiplexer.
  always_comb begin
    m_rdata  = '0;
    wait_raw = 1'b0;
    for (int unsigned s = 0; s < NS; s++) begin
      if (slave_sel[s]) begin
        m_rdata  = s_rdata[s];
        wait_raw = s_wait[s];
      end
    end
  end

  // Malicious wait detection and nullification.
  assign mal_wait = bus_trans && wait_raw && (wait_cnt >= wait_thresh);
  assign wait_eff = wait_raw && !mal_wait;
  assign done     = bus_trans && !wait_eff;
  assign bus_busy = bus_trans && wait_eff;
  assign m_err    = done && (default_sel || mal_wait);

  always_comb begin
    m_ready = '0;
    m_ready[master_id] = done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wait_cnt <= '0;
    else if (bus_busy) wait_cnt <= wait_cnt + 1'b1;
    else               wait_cnt <= '0;
  end

  // A transfer that is not complete keeps the same address until it is.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bus_busy |=> $stable(bus_addr));

endmodule
