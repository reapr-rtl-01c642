// axi_pkg: AXI4 channel payloads of the kernel's global-memory master port.
//
// The kernel moves one byte per beat in each direction (input symbols in,
// votes out), so the data bus is 8 bits wide; addresses are 64 bits.  Only
// INCR bursts of single-byte beats are issued.  The valid/ready handshake
// bits travel beside these structs as plain signals.
package axi_pkg;

  localparam int unsigned ADDR_W = 64;
  localparam int unsigned DATA_W = 8;

  localparam logic [2:0] SIZE_1B    = 3'd0;
  localparam logic [1:0] BURST_INCR = 2'b01;
  localparam logic [1:0] RESP_OKAY  = 2'b00;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {     // AR and AW
    addr_t      addr;
    logic [7:0] len;          // beats - 1
    logic [2:0] size;
    logic [1:0] burst;
  } ax_t;

  typedef struct packed {
    data_t      data;
    logic [1:0] resp;
    logic       last;
  } r_t;

  typedef struct packed {
    data_t      data;
    logic       strb;
    logic       last;
  } w_t;

  typedef struct packed {
    logic [1:0] resp;
  } b_t;

  // Beats of the next burst: at most max_beats, what remains, and never
  // across a 4 KB boundary.
  function automatic logic [8:0] burst_beats(input addr_t addr, input logic [31:0] remaining,
                                             input logic [8:0] max_beats);
    logic [12:0] to_4k;
    logic [31:0] n;
    to_4k = 13'd4096 - {1'b0, addr[11:0]};
    n = {23'd0, max_beats};
    if (remaining < n) n = remaining;
    if ({19'd0, to_4k} < n) n = {19'd0, to_4k};
    return n[8:0];
  endfunction

endpackage
