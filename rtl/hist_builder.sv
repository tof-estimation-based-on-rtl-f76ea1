// hist_builder: counts pixel hits into histogram bins held in a block RAM.
//
// Each request (REQ with ADDR) is a three-clock read-modify-write on the
// single-port memory:
//   RD  memory read of ADDR (REN);
//   LD  the adder input loads the old word, or 0 when the bin is stale (LD);
//   WR  the incremented value is written back (WEN).
// BUSY is high in LD and WR. A new REQ is accepted only in the idle state;
// with one reading every 15 or more clocks this never collides (asserted).
// UPD_VALID pulses in WR with UPD_ADDR and UPD_COUNT, the new bin value,
// for the peak detector.
//
// Two ways to empty the memory between histograms, chosen by CLR_MODE:
//  CLR_SIG (signaled clearing): a reset_memory keeps one flag per bin. RST
//    clears the flags in one clock; a bin whose flag is clear is treated as 0
//    when incremented and when read out. No clearing latency.
//  CLR_SEQ (sequential clearing): while CLR_MEM is high a clear_counter
//    drives the address and zeros are written to all 2**NS bins, one per
//    clock; CLR_DONE is high on the last one. 256 clocks of latency.
// Readout: while RD_EN is high and no update is running, RD_ADDR is read;
// RD_BIN shows that bin (0 if stale) one clock later.
// The three-step update, both mechanisms and the read-before-write memory
// follow the document; the handshake signals and rising-edge clearing are
// this design's choices. Bins wrap at 2**BIN_W like a plain 12-bit counter.
module hist_builder #(
  parameter int unsigned NS       = sifh_pkg::NS,
  parameter int unsigned BIN_W    = sifh_pkg::BIN_W,
  parameter sifh_pkg::clr_mode_e CLR_MODE = sifh_pkg::CLR_SIG
) (
  input  logic             clk,
  input  logic             rst,       // system reset
  input  logic             hist_rst,  // RST: start a new histogram (SigCM)
  input  logic             clr_mem,   // SeqCM sweep request (level)
  output logic             clr_done,  // last address of the sweep
  input  logic             req,
  input  logic [NS-1:0]    addr,
  output logic             busy,
  output logic             upd_valid,
  output logic [NS-1:0]    upd_addr,
  output logic [BIN_W-1:0] upd_count,
  input  logic             rd_en,
  input  logic [NS-1:0]    rd_addr,
  output logic [BIN_W-1:0] rd_bin
);

  typedef enum logic [1:0] {S_IDLE, S_LD, S_WR} state_e;

  state_e           state;
  logic [NS-1:0]    addr_q;
  logic [BIN_W-1:0] in_q;     // adder input, loaded in LD

  // memory port
  logic             m_en, m_we;
  logic [NS-1:0]    m_addr;
  logic [BIN_W-1:0] m_di, m_do;

  // clearing helpers
  logic [NS-1:0]    clr_addr;
  logic             sel;      // bin at m_addr already hit (SigCM)
  logic             sel_q;    // sel of the word now on m_do
  logic             sweep;

  assign sweep = (CLR_MODE == sifh_pkg::CLR_SEQ) && clr_mem;

  hist_bram #(.AW(NS), .DW(BIN_W)) u_bram (
    .clk  (clk),
    .en   (m_en),
    .we   (m_we),
    .addr (m_addr),
    .di   (m_di),
    .dout (m_do)
  );

  if (CLR_MODE == sifh_pkg::CLR_SIG) begin : g_sig
    reset_memory #(.AW(NS)) u_rstmem (
      .clk  (clk),
      .rst  (rst || hist_rst),
      .wen  (m_we),
      .addr (m_addr),
      .sel  (sel)
    );
    assign clr_addr = '0;
    assign clr_done = 1'b0;
  end else begin : g_seq
    clear_counter #(.AW(NS)) u_cnt8 (
      .clk  (clk),
      .rst  (rst),
      .en   (clr_mem),
      .cnt  (clr_addr),
      .last (clr_done)
    );
    assign sel = 1'b1; // memory is really zeroed: every word is current
  end

  // memory port multiplexing: sweep, then update, then readout
  always_comb begin
    m_en   = 1'b0;
    m_we   = 1'b0;
    m_addr = rd_addr;
    m_di   = in_q + 1'b1;
    if (sweep) begin
      m_en   = 1'b1;
      m_we   = 1'b1;
      m_addr = clr_addr;
      m_di   = '0;
    end else if (state == S_WR) begin
      m_en   = 1'b1;
      m_we   = 1'b1;
      m_addr = addr_q;
    end else if (state == S_IDLE && req) begin
      m_en   = 1'b1;
      m_addr = addr;
    end else if (state == S_IDLE && rd_en) begin
      m_en   = 1'b1;
      m_addr = rd_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      addr_q <= '0;
      in_q   <= '0;
      sel_q  <= 1'b0;
    end else begin
      if (m_en && !m_we) sel_q <= sel;
      unique case (state)
        S_IDLE: if (req && !sweep) begin
          addr_q <= addr;
          state  <= S_LD;
        end
        S_LD: begin
          in_q  <= sel_q ? m_do : '0;
          state <= S_WR;
        end
        S_WR:    state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign upd_valid = (state == S_WR);
  assign upd_addr  = addr_q;
  assign upd_count = m_di;
  assign rd_bin    = sel_q ? m_do : '0;

  // A reading must not arrive while the previous one is still being counted.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) req |-> !busy)
    else $error("hist_builder: request while busy");
  a_no_req_in_sweep: assert property (@(posedge clk) disable iff (rst) req |-> !sweep)
    else $error("hist_builder: request during clearing sweep");

endmodule
