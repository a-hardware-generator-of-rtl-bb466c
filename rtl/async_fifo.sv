// async_fifo: dual-clock first-in first-out queue of data words.
//
// The write side runs on wclk, the read side on an unrelated rclk. Each side
// keeps a binary pointer one bit wider than the address and passes its Gray
// code to the other side through a two-flop synchroniser; full and empty are
// computed from the own pointer and the synchronised other one, so both are
// conservative (full may stay high, and empty may stay high, a few cycles
// longer than needed) and never late.
//
// Write: winc with wdata stores a word at the wclk edge; winc while wfull is
// high is a protocol error (asserted). Read: rdata always shows the oldest
// word (show-ahead) while rempty is low; rinc at an rclk edge removes it;
// rinc while rempty is high is a protocol error. Each side has its own
// active-low asynchronous reset; both must be applied together.
//
// The document gives a FIFO between the generator clock and the external
// reader with 32-bit words and a full flag; the depth, the Gray-code
// structure and the show-ahead read are this design's choices.
module async_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 8      // depth 2^AW words
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          winc,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rinc,
  output logic [DW-1:0] rdata,
  output logic          rempty
);

  typedef logic [AW:0] ptr_t;

  logic [DW-1:0] mem [2**AW];

  ptr_t wbin_q, wgray_q, rbin_q, rgray_q;
  ptr_t rgray_w1, rgray_w2;   // read pointer in the write domain
  ptr_t wgray_r1, wgray_r2;   // write pointer in the read domain
  ptr_t wbin_n, rbin_n, wgray_n, rgray_n;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // Write side
  always_comb begin
    wbin_n  = wbin_q + ptr_t'(winc && !wfull);
    wgray_n = bin2gray(wbin_n);
  end

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      wfull    <= 1'b0;
    end else begin
      wbin_q   <= wbin_n;
      wgray_q  <= wgray_n;
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      wfull    <= (wgray_n == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  // Read side
  always_comb begin
    rbin_n  = rbin_q + ptr_t'(rinc && !rempty);
    rgray_n = bin2gray(rbin_n);
  end

  assign rdata = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rempty   <= 1'b1;
    end else begin
      rbin_q   <= rbin_n;
      rgray_q  <= rgray_n;
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      rempty   <= (rgray_n == wgray_r2);
    end
  end

  // Protocol rules
  a_no_write_when_full: assert property (@(posedge wclk) disable iff (!wrst_n) !(winc && wfull))
    else $error("async_fifo: write while full");
  a_no_read_when_empty: assert property (@(posedge rclk) disable iff (!rrst_n) !(rinc && rempty))
    else $error("async_fifo: read while empty");

  initial assert (AW >= 2) else $fatal(1, "async_fifo: AW must be at least 2");

endmodule
