fc6ccd000205600039f0fd8ac68fdcc2ef7f81f10
f546670001f57000ac08fd9e1a6f975de67b9748e
ee84af0001d850011314fdc19a1f58b53b7465bda
e827a70001b0f0016d42fdf177df21dd5b6ab29b8
def62b0001659001ded8fe4ce15edc8088582c7be
d31cac0000eaa0024d43fee2738e994fdb39dd441
c77f6a00005f0002897bff8c6ace74aa86176c0a9
c0dc5800000b0002954dfff2a84e6df74302b42dc
