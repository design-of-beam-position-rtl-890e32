// axi4_buf_reader: AXI4 read-only slave for the circular beam-data buffer.
//
// The ARM reads the stored beam data through this port. Byte addresses are
// relative to the buffer's read start (rd_base from the controller), so
// address 0 is the oldest record and the interlock sample sits at record
// DEPTH-POST. A record is 32 bytes: address bits [4:2] select one of its
// eight 32-bit words and bits [AW+4:5] the record, modulo DEPTH. Reading
// through AXI4 follows the original design; the address map is this design's.
//
// Bursts: INCR (and WRAP, served as INCR) advance by four bytes per beat,
// FIXED repeats the address; arsize is taken as four bytes. rresp is always
// OKAY. One burst is served at a time: a beat takes a BRAM read cycle
// (S_FETCH) and then waits in S_DATA until the master takes it, so the port
// delivers at most one word every two cycles.
module axi4_buf_reader
  import bpm_ilk_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned ID_W  = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // AXI4 read address channel
  input  logic [ID_W-1:0] s_axi_arid,
  input  logic [31:0]     s_axi_araddr,
  input  logic [7:0]      s_axi_arlen,
  input  logic [2:0]      s_axi_arsize,
  input  logic [1:0]      s_axi_arburst,
  input  logic            s_axi_arvalid,
  output logic            s_axi_arready,
  // AXI4 read data channel
  output logic [ID_W-1:0] s_axi_rid,
  output logic [31:0]     s_axi_rdata,
  output logic [1:0]      s_axi_rresp,
  output logic            s_axi_rlast,
  output logic            s_axi_rvalid,
  input  logic            s_axi_rready,
  // buffer
  input  logic [AW-1:0]   rd_base,
  output logic            mem_re,
  output logic [AW-1:0]   mem_raddr,
  input  rec_t            mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_DATA} st_e;
  st_e st;

  logic [31:0]     addr;
  logic [7:0]      beats_left;
  logic            fixed;
  logic [ID_W-1:0] id;
  logic [2:0]      word;   // word of the record in mem_rdata

  assign s_axi_arready = st == S_IDLE;
  assign mem_re        = st == S_FETCH;
  assign mem_raddr     = rd_base + addr[AW+4:5];

  assign s_axi_rvalid = st == S_DATA;
  assign s_axi_rid    = id;
  assign s_axi_rresp  = 2'b00;
  assign s_axi_rlast  = beats_left == 8'd0;
  assign s_axi_rdata  = mem_rdata[32*word +: 32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      addr       <= '0;
      beats_left <= '0;
      fixed      <= 1'b0;
      id         <= '0;
      word       <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (s_axi_arvalid) begin
          addr       <= {s_axi_araddr[31:2], 2'b00};
          beats_left <= s_axi_arlen;
          fixed      <= s_axi_arburst == 2'b00;
          id         <= s_axi_arid;
          st         <= S_FETCH;
        end
        S_FETCH: begin
          word <= addr[4:2];
          st   <= S_DATA;
        end
        S_DATA: if (s_axi_rready) begin
          if (beats_left == 8'd0) begin
            st <= S_IDLE;
          end else begin
            beats_left <= beats_left - 8'd1;
            if (!fixed) addr <= addr + 32'd4;
            st <= S_FETCH;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // AXI4 rule: while valid and not ready, the read beat must hold still.
  property p_r_stable;
    @(posedge clk) disable iff (!rst_n)
      s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata) && $stable(s_axi_rlast);
  endproperty
  a_r_stable: assert property (p_r_stable) else $error("R channel changed while stalled");

endmodule
