// axil_regs: AXI4-Lite register bank between the interlock logic and the ARM.
//
// The interlock states are single-bit flags, so a light AXI4-Lite slave
// carries them, together with the interlock parameters, to the processor.
// The register map is this design's own (byte offsets, 32-bit registers):
//   0x00 CTRL     [0] clear (write 1: one-cycle pulse, reads 0)
//                 [1] test mode (accumulator source)  [5:4] trigger mode
//   0x04 LATCHED  [24:0] latched interlock states            (read only)
//   0x08 LIVE     [24:0] live interlock states               (read only)
//   0x0C BUFSTAT  [1:0] buffer state, [8] interlock output   (read only)
//   0x10 LOCK     locked buffer address                      (read only)
//   0x14 RDBASE   record where reading starts                (read only)
//   0x18 BEAMLVL  [15:0] beam enable level, reset 200
//   0x1C OVERTIME [15:0] overthreshold time in samples, reset 1
//   0x20 PULSEMAX [15:0] beam pulse width limit, reset 0xFFFF
//   0x24 ADCSAT   [15:0] ADC saturation level, reset 0x7FFF
//   0x40+8q       [15:0] high limit of quantity q, reset 0x7FFF
//   0x44+8q       [15:0] low limit of quantity q, reset 0x8000
// The limits reset to the extremes, where no high or low state can trip.
// Unmapped addresses read 0 and ignore writes; responses are always OKAY.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY and WREADY high together for one cycle); the
// B response follows the next cycle. A read is taken when no read response is
// pending; R follows the next cycle. WSTRB byte enables are honoured.
module axil_regs
  import bpm_ilk_pkg::*;
#(
  parameter int unsigned BUF_AW = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
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
  // to / from the interlock logic
  output ilk_cfg_t          cfg,
  output logic              clear,
  output logic              test_mode,
  input  logic [N_ILK-1:0]  latched,
  input  logic [N_ILK-1:0]  live,
  input  buf_state_e        buf_state,
  input  logic              ilk,
  input  logic [BUF_AW-1:0] lock_addr,
  input  logic [BUF_AW-1:0] rd_base
);

  // ---------------- write channel
  logic wr_go;
  assign wr_go          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign s_axil_bresp   = 2'b00;

  // Byte-masked update of a 16-bit field.
  function automatic logic [15:0] upd16(logic [15:0] old, logic [31:0] d, logic [3:0] be);
    return {be[1] ? d[15:8] : old[15:8], be[0] ? d[7:0] : old[7:0]};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_bvalid     <= 1'b0;
      clear             <= 1'b0;
      test_mode         <= 1'b0;
      cfg.trig_mode     <= TRIG_SUM;
      cfg.beam_en_level <= BEAM_EN_LEVEL_DEFAULT;
      cfg.over_time     <= 16'd1;
      cfg.pulse_max     <= 16'hFFFF;
      cfg.adc_sat       <= 16'h7FFF;
      for (int q = 0; q < N_QTY; q++) begin
        cfg.hi[q] <= 16'h7FFF;
        cfg.lo[q] <= 16'h8000;
      end
    end else begin
      clear <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_go) begin
        s_axil_bvalid <= 1'b1;
        case (s_axil_awaddr[7:2])
          6'h00: if (s_axil_wstrb[0]) begin
            clear         <= s_axil_wdata[0];
            test_mode     <= s_axil_wdata[1];
            cfg.trig_mode <= trig_mode_e'(s_axil_wdata[5:4]);
          end
          6'h06: cfg.beam_en_level <= upd16(cfg.beam_en_level, s_axil_wdata, s_axil_wstrb);
          6'h07: cfg.over_time     <= upd16(cfg.over_time,     s_axil_wdata, s_axil_wstrb);
          6'h08: cfg.pulse_max     <= upd16(cfg.pulse_max,     s_axil_wdata, s_axil_wstrb);
          6'h09: cfg.adc_sat       <= upd16(cfg.adc_sat,       s_axil_wdata, s_axil_wstrb);
          default: begin
            for (int q = 0; q < N_QTY; q++) begin
              if (s_axil_awaddr == 8'(32'h40 + 8*q))
                cfg.hi[q] <= upd16(cfg.hi[q], s_axil_wdata, s_axil_wstrb);
              if (s_axil_awaddr == 8'(32'h44 + 8*q))
                cfg.lo[q] <= upd16(cfg.lo[q], s_axil_wdata, s_axil_wstrb);
            end
          end
        endcase
      end
    end
  end

  // ---------------- read channel
  logic [31:0] rd_word;
  assign s_axil_arready = !s_axil_rvalid;
  assign s_axil_rresp   = 2'b00;

  always_comb begin
    rd_word = '0;
    case (s_axil_araddr[7:2])
      6'h00: rd_word = {26'd0, cfg.trig_mode, 2'b00, test_mode, 1'b0};
      6'h01: rd_word = 32'(latched);
      6'h02: rd_word = 32'(live);
      6'h03: rd_word = {23'd0, ilk, 6'd0, buf_state};
      6'h04: rd_word = 32'(lock_addr);
      6'h05: rd_word = 32'(rd_base);
      6'h06: rd_word = {16'd0, cfg.beam_en_level};
      6'h07: rd_word = {16'd0, cfg.over_time};
      6'h08: rd_word = {16'd0, cfg.pulse_max};
      6'h09: rd_word = {16'd0, cfg.adc_sat};
      default: begin
        for (int q = 0; q < N_QTY; q++) begin
          if (s_axil_araddr[7:2] == 6'((32'h40 + 8*q) >> 2)) rd_word = {16'd0, cfg.hi[q]};
          if (s_axil_araddr[7:2] == 6'((32'h44 + 8*q) >> 2)) rd_word = {16'd0, cfg.lo[q]};
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_word;
      end
    end
  end

  // AXI4-Lite rule: a response stays valid until it is accepted.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid) else $error("B dropped");
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata)) else $error("R dropped");

endmodule
