// tsv_bus_pkg: shared types and constants of the interlayer pipeline bus.
//
// A datagram crosses the bus as a single flit. Its header carries the
// destination layer, which every transfer stage compares with its own layer
// address, and the destination IP core, which only the router of the target
// layer decodes. The sizes follow a 4x4x4 system: four stacked layers, each a
// 4x4 mesh of 16 IP cores. The 32-bit payload width and the one-flit datagram
// are choices of this design; the header fields are the ones the architecture
// defines.
package tsv_bus_pkg;

  localparam int unsigned N_LAYERS_DEF    = 4;
  localparam int unsigned CORES_PER_LAYER = 16;
  localparam int unsigned LAYER_W         = $clog2(N_LAYERS_DEF);
  localparam int unsigned CORE_W          = $clog2(CORES_PER_LAYER);
  localparam int unsigned DATA_W          = 32;

  typedef logic [LAYER_W-1:0] layer_addr_t;
  typedef logic [CORE_W-1:0]  core_addr_t;

  // One datagram: header (layer address, IP-core address) then payload.
  typedef struct packed {
    layer_addr_t            dst_layer;
    core_addr_t             dst_core;
    logic [DATA_W-1:0]      payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

endpackage
