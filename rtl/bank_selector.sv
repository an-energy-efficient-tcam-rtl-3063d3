// bank_selector: Data Bank Selector and output multiplexer.
//
// While the tag array is searched, the N least significant tag bits of the
// request select which of the 2^N data banks is activated, so that on a
// match only one row of one bank is read. The selector decodes those bits
// into a one-hot bank enable and, one cycle later (the banks are
// synchronous), steers the read data of the selected bank to the cache
// output. The select is registered together with the read so the output
// mux follows the bank that was actually read.
//
// Timing: `bank_en` is combinational from `tag_lsb` and `access`; `rdata`
// is valid the cycle after an access, from the bank chosen in that access.
module bank_selector #(
  parameter int unsigned N         = 3,
  parameter int unsigned LINE_BITS = 32,
  parameter int unsigned BANKS     = 1 << N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 access,
  input  logic [N-1:0]         tag_lsb,
  output logic [BANKS-1:0]     bank_en,
  input  logic [LINE_BITS-1:0] bank_rdata [BANKS],
  output logic [LINE_BITS-1:0] rdata
);

  logic [N-1:0] sel_q;

  always_comb begin
    bank_en = '0;
    if (access) bank_en[tag_lsb] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sel_q <= '0;
    else if (access) sel_q <= tag_lsb;
  end

  assign rdata = bank_rdata[sel_q];

endmodule
