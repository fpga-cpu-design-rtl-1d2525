// Wishbone B4 classic bus, 32-bit data, word addressed (adr is byte address
// bits 31:2), with byte selects and an error response. One master and one
// slave share an instance; the modports give each side its directions. A
// master holds cyc and stb together until the slave answers with ack or err
// for one cycle.
//
// The signal names follow the original core's bus ports. Bundling them in an
// interface is this design's choice.
interface wb_if;
  logic [29:0] adr;
  logic [31:0] dat_w;
  logic [31:0] dat_r;
  logic [3:0]  sel;
  logic        cyc;
  logic        stb;
  logic        we;
  logic        ack;
  logic        err;

  modport master (output adr, dat_w, sel, cyc, stb, we, input dat_r, ack, err);
  modport slave  (input adr, dat_w, sel, cyc, stb, we, output dat_r, ack, err);
endinterface
