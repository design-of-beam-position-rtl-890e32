// bpm_ilk_top: beam position and phase interlock system (programmable logic).
//
// Beam data from the BPM signal processing (or, in the test mode, from the
// accumulator test source) enters once per sample strobe. The state monitor
// checks 25 interlock states against limits held in the AXI4-Lite register
// bank; the status latch holds any state that trips and drives ilk_out to
// the machine protection system. In parallel every sample is written as a
// 256-bit record into a circular BRAM buffer of DEPTH records. The first
// interlock after a clear locks the buffer address; writing goes on for POST
// records and then stops, so the buffer holds the beam data before and after
// the interlock (4.096 ms each way at one record per microsecond). irq
// tells the ARM that the record is complete; it reads the latched status and
// the lock address over AXI4-Lite and the records over AXI4, then writes the
// clear bit, which releases the latch and restarts cyclic writing.
//
// Timing: live states are registered one cycle after the strobe, the latch
// and interlock event one cycle later, so the address locked is that of the
// interlock sample as long as strobes are at least three cycles apart (at
// 1 MS/s with a clock of tens of MHz they are far more). One clock drives
// everything.
//
// The partition into state monitoring, status latching, circular buffer,
// AXI4-Lite status path and AXI4 data path follows the original design; the
// single clock, the widths and the test-mode multiplexer are this design's
// choices.
module bpm_ilk_top
  import bpm_ilk_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned POST  = 4096,
  parameter int unsigned ID_W  = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // beam data
  input  logic              sample_valid,
  input  beam_sample_t      beam_in,
  input  logic              ext_trig,
  // to the machine protection system and the ARM
  output logic              ilk_out,
  output logic              irq,
  output logic              beam_en,      // beam-present reference
  // AXI4-Lite slave: parameters and status
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [7:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // AXI4 slave, read only: buffered beam data
  input  logic [ID_W-1:0]   s_axi_arid,
  input  logic [31:0]       s_axi_araddr,
  input  logic [7:0]        s_axi_arlen,
  input  logic [2:0]        s_axi_arsize,
  input  logic [1:0]        s_axi_arburst,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [ID_W-1:0]   s_axi_rid,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rlast,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready
);

  ilk_cfg_t          cfg;
  logic              clear, test_mode;
  beam_sample_t      acc_beam, beam;
  logic [N_ILK-1:0]  live, latched;
  logic              ilk_event;
  logic              we, mem_re;
  logic [AW-1:0]     waddr, raddr, lock_addr, rd_base;
  buf_state_e        buf_state;
  rec_t              rdata;

  acc_test_source u_acc (
    .clk, .rst_n, .en(test_mode), .sample_valid, .beam(acc_beam)
  );

  assign beam = test_mode ? acc_beam : beam_in;

  ilk_state_monitor u_mon (
    .clk, .rst_n, .sample_valid, .beam, .ext_trig, .cfg, .beam_en, .live
  );

  ilk_status_latch #(.N(N_ILK)) u_latch (
    .clk, .rst_n, .live, .clear, .latched, .ilk(ilk_out), .event_o(ilk_event)
  );

  circ_buf_ctrl #(.DEPTH(DEPTH), .POST(POST)) u_ctrl (
    .clk, .rst_n, .sample_valid, .ilk_event, .clear,
    .we, .waddr, .lock_addr, .rd_base, .state(buf_state), .done(irq)
  );

  circ_buf_mem #(.DEPTH(DEPTH), .W(REC_W)) u_mem (
    .clk, .we, .waddr, .wdata(to_record(beam)), .re(mem_re), .raddr, .rdata
  );

  axi4_buf_reader #(.DEPTH(DEPTH), .ID_W(ID_W)) u_rd (
    .clk, .rst_n,
    .s_axi_arid, .s_axi_araddr, .s_axi_arlen, .s_axi_arsize, .s_axi_arburst,
    .s_axi_arvalid, .s_axi_arready,
    .s_axi_rid, .s_axi_rdata, .s_axi_rresp, .s_axi_rlast, .s_axi_rvalid, .s_axi_rready,
    .rd_base, .mem_re, .mem_raddr(raddr), .mem_rdata(rdata)
  );

  axil_regs #(.BUF_AW(AW)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .cfg, .clear, .test_mode, .latched, .live, .buf_state, .ilk(ilk_out),
    .lock_addr, .rd_base
  );

endmodule
