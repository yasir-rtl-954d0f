// yasir_err_gen: builds the 2-octet err string the Receiver appends to a rejected frame.
//
// When a frame's tag does not verify, the Receiver must make the destination device
// drop it by failing the device's own conformance check. This block keeps a running
// CRC over the content octets the Receiver has already relayed (cleared by `clr` at
// the start symbol, advanced by each `upd_valid` octet, one octet per clock) and
// offers err = bitwise complement of that CRC, low octet first. For a protocol whose
// last two octets are a CRC over the preceding content (a "Type-I" protocol), the
// appended err then never equals the CRC the device computes, so the check fails.
// For a protocol that checks the frame length against its header ("Type-II"),
// appending two octets to a frame of correct length breaks the length check.
//
// The document asks for an incorrect CRC found by first computing the correct one; it
// does not fix the CRC. The defaults are the Modbus CRC-16 (reflected polynomial
// 0xA001, initial value 0xFFFF), a design choice that the parameters can change.
// Timing: `crc`/`err` reflect all octets accepted up to the previous clock edge.
module yasir_err_gen #(
  parameter logic [15:0] POLY = 16'hA001,  // reflected CRC polynomial
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        upd_valid,
  input  logic [7:0]  upd_data,
  output logic [15:0] crc,
  output logic [7:0]  err0,   // first err octet sent
  output logic [7:0]  err1    // second err octet sent
);

  function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] d);
    logic [15:0] r;
    r = c ^ {8'h00, d};
    for (int i = 0; i < 8; i++)
      r = r[0] ? ((r >> 1) ^ POLY) : (r >> 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         crc <= INIT;
    else if (clr)       crc <= INIT;
    else if (upd_valid) crc <= crc_byte(crc, upd_data);
  end

  assign err0 = ~crc[7:0];
  assign err1 = ~crc[15:8];

endmodule
