// Synchronous FIFO buffer, DEPTH words of WIDTH bits (16 x 8 as published).
//
// Ports follow the published FIFO: data/wrreq (active-high write request),
// rdreq_n (read request, active low as listed in its I/O table), sclr
// (synchronous clear), q, full, empty and usedw (words held). A write
// while full and a read while empty are ignored. A read registers the head
// word into q on the clock edge of the request (q holds it until the next
// read), so q is valid the cycle after rdreq_n was low. A simultaneous read
// and write on a non-empty FIFO both take place, except on a full FIFO:
// there the write is ignored although the read frees a word. The storage is a plain
// array with wrapping pointers; the words are not cleared by sclr. usedw is
// wide enough to show DEPTH itself, which is this design's choice.
module fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic                       clock,
  input  logic                       sclr,
  input  logic [WIDTH-1:0]           data,
  input  logic                       wrreq,
  input  logic                       rdreq_n,
  output logic [WIDTH-1:0]           q,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] usedw
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned UW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign full  = (usedw == UW'(DEPTH));
  assign empty = (usedw == '0);
  assign do_wr = wrreq && !full;
  assign do_rd = !rdreq_n && !empty;

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clock) begin
    if (do_wr) mem[wp] <= data;
  end

  always_ff @(posedge clock) begin
    if (sclr) begin
      wp    <= '0;
      rp    <= '0;
      usedw <= '0;
      q     <= '0;
    end else begin
      if (do_wr) wp <= bump(wp);
      if (do_rd) begin
        q  <= mem[rp];
        rp <= bump(rp);
      end
      usedw <= usedw + UW'(do_wr) - UW'(do_rd);
    end
  end
endmodule
