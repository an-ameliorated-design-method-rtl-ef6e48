// Behavioural AHB-Lite master for the BusMatrix testbenches.
//
// It issues N_TRANS random transactions (SINGLE or 4-beat INCR4, read or
// write) to random slaves, always to its own 16 words in each slave
// (address bits [8:6] = MID), so masters never disturb one another's data.
// It keeps a shadow copy of those words and checks every read against it.
// Following the BusMatrix's rules it inserts MIN_IDLE IDLE transfers after
// each transaction and counts an address phase as accepted only when HREADY
// is high. With err_en high it also sends a few SINGLE reads to an unmapped
// address and expects an ERROR response.
//
// Counters: delays (cycles an address phase waited with no data phase open,
// i.e. DELAY responses), zero_starts (transactions whose first address phase
// was accepted at once), last_lat and last_len (cycles from the first
// NONSEQ cycle to the end of the last data phase, and beats, of the last
// transaction), n_done, checks and failures.
module ahb_tb_master
  import bm_pkg::*;
#(
  parameter int unsigned MID      = 0,
  parameter int unsigned NS       = 4,
  parameter int unsigned SLV_LSB  = 28,
  parameter int unsigned N_TRANS  = 20,
  parameter int unsigned MIN_IDLE = 1,
  parameter logic [31:0] INIT_BASE = 32'hC0DE_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  int                fixed_slave,   // <0: random slave
  input  logic              err_en,        // allow reads of an unmapped address
  output logic              hsel,
  output bm_req_t           req,
  output logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  input  hresp_e            hresp,
  input  logic [DATA_W-1:0] hrdata,
  output logic              done,
  output int                delays,
  output int                zero_starts,
  output int                errors_seen,
  output int                last_lat,
  output int                last_len,
  output int                n_done,
  output int                checks,
  output int                failures
);

  logic [DATA_W-1:0] shadow [NS][16];
  int unsigned beats_left, idle_cnt, n_started, lat_cnt, cur_len, wait_cnt;
  logic        d_valid, d_write, d_err, d_last, a_last, a_err;
  int unsigned d_slave, d_word, a_slave, a_word;
  bit          timing_on;

  function automatic logic [31:0] mk_addr(int unsigned s, int unsigned w);
    return (32'(s) << SLV_LSB) | (32'(MID) << 6) | (32'(w) << 2);
  endfunction

  assign hsel = 1'b1;
  assign done = (n_done == N_TRANS) && !d_valid && (req.htrans == HTRANS_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++)
        for (int w = 0; w < 16; w++)
          shadow[s][w] <= INIT_BASE | (s << 12) | ((MID << 4) + w);
      req <= REQ_IDLE; hwdata <= '0;
      beats_left <= 0; idle_cnt <= MIN_IDLE; n_started <= 0; lat_cnt <= 0; cur_len <= 0;
      wait_cnt <= 0; timing_on <= 1'b0;
      d_valid <= 1'b0; d_write <= 1'b0; d_err <= 1'b0; d_last <= 1'b0; a_last <= 1'b0; a_err <= 1'b0;
      d_slave <= 0; d_word <= 0; a_slave <= 0; a_word <= 0;
      delays <= 0; zero_starts <= 0; errors_seen <= 0; last_lat <= 0; last_len <= 0;
      n_done <= 0; checks <= 0; failures <= 0;
    end else begin
      if (timing_on) lat_cnt <= lat_cnt + 1;
      if (!hready) begin
        if (req.htrans != HTRANS_IDLE && !d_valid) delays <= delays + 1;
        if (req.htrans == HTRANS_NONSEQ) wait_cnt <= wait_cnt + 1;
      end else begin
        // end of the data phase
        if (d_valid) begin
          checks <= checks + 1;
          if (d_err) begin
            if (hresp != HRESP_ERROR) begin
              failures <= failures + 1;
              $display("master %0d: expected ERROR, got %0d", MID, hresp);
            end else errors_seen <= errors_seen + 1;
          end else if (hresp != HRESP_OKAY) begin
            failures <= failures + 1;
            $display("master %0d: unexpected response %0d", MID, hresp);
          end else if (!d_write && hrdata !== shadow[d_slave][d_word]) begin
            failures <= failures + 1;
            $display("master %0d: read slave %0d word %0d got %h expected %h",
                     MID, d_slave, d_word, hrdata, shadow[d_slave][d_word]);
          end
          if (d_last) begin
            n_done    <= n_done + 1;
            last_lat  <= lat_cnt + 1;
            last_len  <= cur_len;
            timing_on <= 1'b0;
          end
        end
        // the address phase moves to the data phase
        d_valid <= req.htrans[1];
        d_write <= req.hwrite;
        d_err   <= a_err;
        d_last  <= a_last && req.htrans[1];
        d_slave <= a_slave;
        d_word  <= a_word;
        if (req.htrans == HTRANS_NONSEQ && wait_cnt == 0) zero_starts <= zero_starts + 1;
        wait_cnt <= 0;
        if (req.htrans[1] && req.hwrite) begin
          logic [31:0] wd;
          wd = $urandom;
          hwdata <= wd;
          shadow[a_slave][a_word] <= wd;
        end
        // next address phase
        if (beats_left != 0) begin
          req.htrans <= HTRANS_SEQ;
          req.haddr  <= req.haddr + 4;
          a_word     <= a_word + 1;
          a_last     <= (beats_left == 1);
          beats_left <= beats_left - 1;
        end else if (req.htrans != HTRANS_IDLE || idle_cnt < MIN_IDLE) begin
          req.htrans <= HTRANS_IDLE;
          idle_cnt   <= (req.htrans != HTRANS_IDLE) ? 1 : idle_cnt + 1;
          a_err      <= 1'b0;
        end else if (enable && n_started < N_TRANS && ($urandom % 4) != 0) begin
          int unsigned s, w, len;
          bit err;
          s   = (fixed_slave >= 0) ? fixed_slave : ($urandom % NS);
          len = ($urandom % 3 == 0) ? 1 : 4;
          w   = (len == 4) ? 4 * ($urandom % 4) : ($urandom % 16);
          err = err_en && ($urandom % 8 == 0);
          n_started  <= n_started + 1;
          req.htrans <= HTRANS_NONSEQ;
          req.haddr  <= err ? 32'hFFFF_FF00 : mk_addr(s, w);
          req.hwrite <= err ? 1'b0 : ($urandom % 2 == 1);
          req.hburst <= (len == 4) ? 3'b011 : 3'b000;
          req.hsize  <= 3'b010;
          a_slave    <= s;
          a_word     <= w;
          a_err      <= err;
          a_last     <= (len == 1) || err;
          beats_left <= err ? 0 : len - 1;
          cur_len    <= err ? 1 : len;
          lat_cnt    <= 0;
          timing_on  <= 1'b1;
        end else begin
          req.htrans <= HTRANS_IDLE;
          idle_cnt   <= idle_cnt + 1;
        end
      end
    end
  end

endmodule
