// predadd: address computation for the predecessor caches.
//
// The offsets of the topology word are registered at stage 1 (topology1).
// A modulo counter gives the cache slot that the row in stage 1 is written to
// at the end of that stage. Each of the three 4-bit two's-complement offsets
// is added to that slot to give the read address of one predecessor (offset
// 0 = the state itself, -1 = the state before it, ..., up to 15 states back).
// The read addresses are registered (stage 2) and meet cache contents that
// already include the row's own value. Offsets: bits 11:8 first, 7:4 second, 3:0 third predecessor, as
// the design description gives them; the counter convention (read = slot +
// offset, no separate carry-in) is this implementation's.
//
// The counter advances on every cycle with en high (bubbles included) and is
// cleared by startcounter at the start of a frame.
module predadd #(
  parameter int AW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          startcounter,
  input  logic [3*AW-1:0] predecessor_data,
  output logic [AW-1:0] writeadd_data,
  output logic [AW-1:0] firstpredadd2,
  output logic [AW-1:0] seconpredadd2,
  output logic [AW-1:0] thirdpredadd2
);
  logic [AW-1:0]   cnt;
  logic [3*AW-1:0] topology1;

  always_ff @(posedge clk) begin
    if (rst || startcounter) cnt <= '0;
    else if (en)             cnt <= cnt + AW'(1);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      topology1     <= predecessor_data;
      firstpredadd2 <= cnt + topology1[3*AW-1:2*AW];
      seconpredadd2 <= cnt + topology1[2*AW-1:AW];
      thirdpredadd2 <= cnt + topology1[AW-1:0];
    end
  end

  assign writeadd_data = cnt;
endmodule
